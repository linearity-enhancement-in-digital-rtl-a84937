// tb_index_mux: self-check of the index interface multiplexer with 4
// (default), 12 and 24 built-in patterns. The reference list of the 24
// orders is built here by nested loops in lexicographic order; pattern k of
// an N-pattern multiplexer must route control level L to sub-array
// perm[k*24/N][L]. Every pattern must be a true permutation, and a select
// value beyond the last pattern must fall back to pattern 0.
module tb_index_mux;
  import mdac_pkg::*;
  int checks = 0, failures = 0;
  int perm [24][4];

  row_rails_t lvl_rails [N_SUB];
  row_rails_t out4 [N_SUB], out12 [N_SUB], out24 [N_SUB];
  logic [1:0] sel4;
  logic [3:0] sel12;
  logic [4:0] sel24;

  index_mux                      dut4  (.sel(sel4),  .lvl_rails(lvl_rails), .sub_rails(out4));
  index_mux #(.NUM_PATTERNS(12)) dut12 (.sel(sel12), .lvl_rails(lvl_rails), .sub_rails(out12));
  index_mux #(.NUM_PATTERNS(24)) dut24 (.sel(sel24), .lvl_rails(lvl_rails), .sub_rails(out24));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_route(string name, int num, int selv, row_rails_t got [N_SUB]);
    int k;
    k = (selv < num) ? selv * 24 / num : 0;
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (got[perm[k][l]] !== lvl_rails[l]) begin
        failures++;
        $display("FAIL %s sel=%0d level %0d not on sub-array %0d", name, selv, l, perm[k][l]);
      end
    end
  endtask

  initial begin
    int n;
    n = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d) begin
              perm[n] = '{a, b, c, d};
              n++;
            end
    for (int it = 0; it < 20; it++) begin
      // Distinct rail words per level so a misroute is always visible.
      for (int l = 0; l < 4; l++) lvl_rails[l] = row_rails_t'((($urandom % 120) << 2) | l);
      for (int s = 0; s < 32; s++) begin
        sel4  = 2'(s);
        sel12 = 4'(s);
        sel24 = 5'(s);
        #1;
        if (s < 4)  check_route("N=4",  4,  s, out4);
        if (s < 16) check_route("N=12", 12, s, out12);
        check_route("N=24", 24, s, out24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
