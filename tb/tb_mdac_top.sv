// tb_mdac_top: end-to-end test of the DAC at its default size (8 bits,
// 4 x 64 cells, 4 index patterns).
//
// For RUNS random mismatch draws (unit current 10000 with a Gaussian spread
// of 3.5 %) it sweeps all 256 codes under every index pattern, as a
// post-fabrication test would, and checks each output against a sum worked
// out here: Iop must be the summed current of the cells that the level
// order of that pattern turns on, and Iop + Ion the total current. From the
// sweep it computes the endpoint INL of each pattern and picks the most
// linear one. It also checks reset and the one-cycle latency, and counts
// how often each mechanism occurred: a partly filled sub-array, a sub-array
// filled through its control level, a partly filled row, a fully lit last
// row, each pattern, outputs that differ between patterns, and a best
// pattern other than the conventional order. A mechanism never seen is a
// failure.
module tb_mdac_top;
  import mdac_pkg::*;
  localparam int RUNS = 8;
  localparam real SIGMA = 0.035;
  localparam int I_UNIT = 10000;

  int checks = 0, failures = 0;
  int perm [24][4];
  int lvl_of [24][4];

  logic clk = 0, rst_n = 1;
  logic [7:0] code = '0;
  logic [1:0] sel = '0;
  logic [15:0] cur [N_CELLS];
  logic [N_CELLS-1:0] cell_on;
  logic [23:0] iop, ion;

  mdac_top dut (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(sel),
                .unit_current(cur), .cell_on(cell_on), .iop(iop), .ion(ion));

  always #5 clk = ~clk;

  initial begin
    repeat (RUNS * 4 * 300 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_partial_sub, n_full_sub, n_partial_row, n_last_row, n_differ, n_best_moved;
  int n_pattern [4];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic longint ref_iop(int k, int v);
    longint sum;
    sum = 0;
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 64; p++)
        if ((64 * lvl_of[k][s] + p) < v) sum += longint'(cur[s*64+p]);
    return sum;
  endfunction

  initial begin
    int n;
    longint total;
    longint meas [4][256];
    real inl_max [4];
    n = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d) begin
              perm[n] = '{a, b, c, d};
              for (int l = 0; l < 4; l++) lvl_of[n][perm[n][l]] = l;
              n++;
            end
    for (int k = 0; k < N_CELLS; k++) cur[k] = 16'(I_UNIT);
    code = 8'd255;
    #1 rst_n = 0;
    #1;
    checks++;
    if (iop !== '0) begin
      failures++;
      $display("FAIL Iop not zero in reset");
    end
    @(negedge clk);
    rst_n = 1;

    for (int run = 0; run < RUNS; run++) begin
      int best;
      total = 0;
      for (int k = 0; k < N_CELLS; k++) begin
        real x;
        x = real'(I_UNIT) * (1.0 + SIGMA * gauss());
        cur[k] = 16'($rtoi(x + 0.5));
        total += longint'(cur[k]);
      end
      for (int p = 0; p < 4; p++) begin
        @(negedge clk);
        sel  = 2'(p);
        code = 8'd0;
        for (int v = 0; v < 256; v++) begin
          longint prev;
          @(negedge clk);
          prev = longint'(iop);
          code = 8'(v + 1);        // next code enters while this one is read
          meas[p][v] = longint'(iop);
          checks++;
          if (meas[p][v] != ref_iop(p * 6, v)) begin
            failures++;
            $display("FAIL run %0d pattern %0d code %0d: Iop=%0d expected %0d",
                     run, p, v, iop, ref_iop(p * 6, v));
          end
          checks++;
          if (longint'(iop) + longint'(ion) != total) begin
            failures++;
            $display("FAIL run %0d pattern %0d code %0d: Iop+Ion=%0d total %0d",
                     run, p, v, longint'(iop) + longint'(ion), total);
          end
          #1;
          checks++;
          if (longint'(iop) != prev) begin
            failures++;
            $display("FAIL output moved before the clock edge");
          end
          if (v % 64 != 0) n_partial_sub++;
          if (v >= 64 && ($countones(cell_on[64*perm[p*6][0] +: 64]) == 64)) n_full_sub++;
          if (v % 8 != 0) n_partial_row++;
          if (v >= 64 && cell_on[64*perm[p*6][0] + 63]) n_last_row++;
          n_pattern[p]++;
          if (p > 0 && meas[p][v] != meas[0][v]) n_differ++;
        end
        // Endpoint INL of this pattern, in LSB.
        begin
          real lsb, e;
          lsb = real'(meas[p][255] - meas[p][0]) / 255.0;
          inl_max[p] = 0.0;
          for (int v = 0; v < 256; v++) begin
            e = real'(meas[p][v] - meas[p][0]) / lsb - real'(v);
            if (e < 0.0) e = -e;
            if (e > inl_max[p]) inl_max[p] = e;
          end
        end
      end
      best = 0;
      for (int p = 1; p < 4; p++) if (inl_max[p] < inl_max[best]) best = p;
      if (best != 0) n_best_moved++;
      $display("run %0d: max|INL| per pattern %.3f %.3f %.3f %.3f LSB, best pattern %0d",
               run, inl_max[0], inl_max[1], inl_max[2], inl_max[3], best);
    end

    checks++;
    if (n_partial_sub == 0 || n_full_sub == 0 || n_partial_row == 0 || n_last_row == 0 ||
        n_differ == 0 || n_best_moved == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_pattern[p] == 0) begin
        failures++;
        $display("FAIL pattern %0d never used", p);
      end
    end
    $display("mechanisms: partial sub-array %0d, full sub-array %0d, partial row %0d, last row lit %0d",
             n_partial_sub, n_full_sub, n_partial_row, n_last_row);
    $display("mechanisms: patterns %0d %0d %0d %0d, outputs differing from pattern 0 %0d, best pattern not 0 in %0d of %0d runs",
             n_pattern[0], n_pattern[1], n_pattern[2], n_pattern[3], n_differ, n_best_moved, RUNS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
