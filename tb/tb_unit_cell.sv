// tb_unit_cell: exhaustive self-check of the unit cell logic. A cell is on
// when its own row is full, or when the previous row is full and its column
// line is high; the complementary switch must always be the opposite.
module tb_unit_cell;
  int checks = 0, failures = 0;
  logic r_prev, r_own, col, sw_p, sw_n;

  unit_cell dut (.r_prev(r_prev), .r_own(r_own), .col(col), .sw_p(sw_p), .sw_n(sw_n));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth table indexed by {r_prev, r_own, col}.
  localparam logic [7:0] EXPECTED = 8'b1110_1100;

  initial begin
    for (int v = 0; v < 8; v++) begin
      {r_prev, r_own, col} = 3'(v);
      #1;
      checks++;
      if (sw_p !== EXPECTED[v]) begin
        failures++;
        $display("FAIL prev=%b own=%b col=%b sw_p=%b", r_prev, r_own, col, sw_p);
      end
      checks++;
      if (sw_n !== ~EXPECTED[v]) begin
        failures++;
        $display("FAIL prev=%b own=%b col=%b sw_n=%b", r_prev, r_own, col, sw_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
