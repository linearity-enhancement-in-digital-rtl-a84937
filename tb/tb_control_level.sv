// tb_control_level: exhaustive self-check of the four control levels A..D.
// For every M1,M2 and every 7-bit row pattern T the rails of level L must be
// all high when the code's level {M1,M2} is above L, all low when below,
// and {last row off, T, first-row enable on} when equal.
module tb_control_level;
  import mdac_pkg::*;
  int checks = 0, failures = 0;
  logic m1, m2;
  logic [SUB_ROWS-2:0] t;
  row_rails_t rails [N_SUB];

  for (genvar l = 0; l < N_SUB; l++) begin : g_dut
    control_level #(.LEVEL(l)) dut (.m1(m1), .m2(m2), .t(t), .rails(rails[l]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int tv = 0; tv < 128; tv++) begin
        {m1, m2} = 2'(s);
        t = 7'(tv);
        #1;
        for (int l = 0; l < 4; l++) begin
          row_rails_t exp_r;
          if (s > l)       exp_r = '1;
          else if (s == l) exp_r = {1'b0, 7'(tv), 1'b1};
          else             exp_r = '0;
          checks++;
          if (rails[l] !== exp_r) begin
            failures++;
            $display("FAIL level=%0d M1M2=%0d T=%b rails=%b expected %b",
                     l, s, t, rails[l], exp_r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
