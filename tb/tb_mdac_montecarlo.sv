// tb_mdac_montecarlo: Monte-Carlo yield experiment on the DAC.
//
// Six DACs are built with 2, 4, 8, 12, 23 and 24 index patterns and share one set
// of unit currents. The experiment is repeated for relative mismatch
// 2.5 % .. 4.5 % (1000 runs at 3.5 %, 300 at the others). Each run draws new
// currents (nominal 10000, Gaussian spread sigma), sweeps all 256 codes under every pattern of every DAC, and
// computes the endpoint INL of each sweep. A DAC passes a run when its best
// pattern keeps |INL| below 0.5 LSB; the conventional converter is pattern
// 0, the in-order wiring. The INL-yield of each variant is printed.
//
// Checks: each DAC's pattern k must give exactly the sweep of permutation
// k*24/N, read from the 24-pattern DAC (same currents, so the same
// numbers); the 24-pattern sweeps are checked against a reference sum on a
// subset of codes; and since the pattern sets nest, the yields must be
// ordered conventional <= 2 <= 4 <= 8, 12 <= 24 and 23 <= 24, with 4 patterns strictly better
// than the conventional wiring over the 1000 runs at 3.5 %.
module tb_mdac_montecarlo;
  import mdac_pkg::*;
  localparam int N_SIGMA = 5;
  localparam real SIGMAS [N_SIGMA] = '{0.025, 0.030, 0.035, 0.040, 0.045};
  localparam int  RUNS   [N_SIGMA] = '{300, 300, 1000, 300, 300};
  localparam int  TOTAL_RUNS = 2200;
  localparam int I_UNIT = 10000;

  int checks = 0, failures = 0;
  int perm [24][4];
  int lvl_of [24][4];

  logic clk = 0, rst_n = 1;
  logic [7:0] code = '0;
  logic [4:0] psel = '0;
  logic [15:0] cur [N_CELLS];
  logic [N_CELLS-1:0] on2, on4, on8, on12, on23, on24;
  logic [23:0] iop2, iop4, iop8, iop12, iop23, iop24, ion2, ion4, ion8, ion12, ion23, ion24;

  mdac_top #(.NUM_PATTERNS(2))  dut2  (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel[0]),
                                       .unit_current(cur), .cell_on(on2),  .iop(iop2),  .ion(ion2));
  mdac_top #(.NUM_PATTERNS(4))  dut4  (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel[1:0]),
                                       .unit_current(cur), .cell_on(on4),  .iop(iop4),  .ion(ion4));
  mdac_top #(.NUM_PATTERNS(8))  dut8  (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel[2:0]),
                                       .unit_current(cur), .cell_on(on8),  .iop(iop8),  .ion(ion8));
  mdac_top #(.NUM_PATTERNS(12)) dut12 (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel[3:0]),
                                       .unit_current(cur), .cell_on(on12), .iop(iop12), .ion(ion12));
  mdac_top #(.NUM_PATTERNS(23)) dut23 (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel),
                                       .unit_current(cur), .cell_on(on23), .iop(iop23), .ion(ion23));
  mdac_top #(.NUM_PATTERNS(24)) dut24 (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(psel),
                                       .unit_current(cur), .cell_on(on24), .iop(iop24), .ion(ion24));

  always #5 clk = ~clk;

  initial begin
    repeat (TOTAL_RUNS * 24 * 260 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic real max_inl(longint m [256]);
    real lsb, e, worst;
    lsb = real'(m[255] - m[0]) / 255.0;
    worst = 0.0;
    for (int v = 0; v < 256; v++) begin
      e = real'(m[v] - m[0]) / lsb - real'(v);
      if (e < 0.0) e = -e;
      if (e > worst) worst = e;
    end
    return worst;
  endfunction

  longint m2 [2][256], m4 [4][256], m8 [8][256], m12 [12][256], m23 [23][256], m24 [24][256];
  real inl24 [24];
  int pass_conv, pass2, pass4, pass8, pass12, pass23, pass24;
  int mismatches;

  task automatic experiment(real sigma, int runs, bit strict);
    pass_conv = 0; pass2 = 0; pass4 = 0; pass8 = 0; pass12 = 0; pass23 = 0; pass24 = 0;
    mismatches = 0;

    for (int run = 0; run < runs; run++) begin
      real b2, b4, b8, b12, b23, b24;
      for (int k = 0; k < N_CELLS; k++)
        cur[k] = 16'($rtoi(real'(I_UNIT) * (1.0 + sigma * gauss()) + 0.5));
      for (int p = 0; p < 24; p++) begin
        @(negedge clk);
        psel = 5'(p);
        code = 8'd0;
        for (int v = 0; v < 256; v++) begin
          @(negedge clk);
          code = 8'(v + 1);
          m24[p][v] = longint'(iop24);
          if (p < 2)  m2[p][v]  = longint'(iop2);
          if (p < 4)  m4[p][v]  = longint'(iop4);
          if (p < 8)  m8[p][v]  = longint'(iop8);
          if (p < 12) m12[p][v] = longint'(iop12);
          if (p < 23) m23[p][v] = longint'(iop23);
          if (run < 2 || v % 37 == 5) begin
            checks++;
            if (m24[p][v] != ref_iop(p, v)) begin
              failures++;
              if (failures < 10)
                $display("FAIL run %0d pattern %0d code %0d: Iop=%0d expected %0d",
                         run, p, v, m24[p][v], ref_iop(p, v));
            end
          end
        end
        inl24[p] = max_inl(m24[p]);
      end
      for (int p = 0; p < 24; p++)
        for (int v = 0; v < 256; v++) begin
          if (p < 2  && m2[p][v]  != m24[p*12][v]) mismatches++;
          if (p < 4  && m4[p][v]  != m24[p*6][v]) mismatches++;
          if (p < 8  && m8[p][v]  != m24[p*3][v]) mismatches++;
          if (p < 12 && m12[p][v] != m24[p*2][v]) mismatches++;
          if (p < 23 && m23[p][v] != m24[p*24/23][v]) mismatches++;
        end
      b2 = 99.0; b4 = 99.0; b8 = 99.0; b12 = 99.0; b23 = 99.0; b24 = 99.0;
      for (int p = 0; p < 24; p++) begin
        if (p < 2  && inl24[p*12] < b2) b2  = inl24[p*12];
        if (p < 4  && inl24[p*6] < b4)  b4  = inl24[p*6];
        if (p < 8  && inl24[p*3] < b8)  b8  = inl24[p*3];
        if (p < 12 && inl24[p*2] < b12) b12 = inl24[p*2];
        if (p < 23 && inl24[p*24/23] < b23) b23 = inl24[p*24/23];
        if (inl24[p] < b24) b24 = inl24[p];
      end
      if (inl24[0] < 0.5) pass_conv++;
      if (b2  < 0.5) pass2++;
      if (b4  < 0.5) pass4++;
      if (b8  < 0.5) pass8++;
      if (b12 < 0.5) pass12++;
      if (b23 < 0.5) pass23++;
      if (b24 < 0.5) pass24++;
    end

    checks++;
    if (mismatches != 0) begin
      failures++;
      $display("FAIL %0d sweeps differ between the smaller DACs and the 24-pattern DAC", mismatches);
    end
    checks++;
    if (!(pass_conv <= pass2 && pass2 <= pass4 && pass4 <= pass8 && pass4 <= pass12 &&
          pass8 <= pass23 && pass12 <= pass23 && pass23 <= pass24)) begin
      failures++;
      $display("FAIL yields not ordered by pattern set");
    end
    checks++;
    if (strict && pass4 <= pass_conv) begin
      failures++;
      $display("FAIL four patterns did not raise the yield");
    end
    $display("sigma_rel = %.3f, %0d runs, INL-yield (|INL| < 0.5 LSB):", sigma, runs);
    $display("  conventional order : %0d / %0d", pass_conv, runs);
    $display("  best of  2 patterns: %0d / %0d", pass2, runs);
    $display("  best of  4 patterns: %0d / %0d", pass4, runs);
    $display("  best of  8 patterns: %0d / %0d", pass8, runs);
    $display("  best of 12 patterns: %0d / %0d", pass12, runs);
    $display("  best of 23 patterns: %0d / %0d", pass23, runs);
    $display("  best of 24 patterns: %0d / %0d", pass24, runs);
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
              for (int l = 0; l < 4; l++) lvl_of[n][perm[n][l]] = l;
              n++;
            end
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < N_SIGMA; i++)
      experiment(SIGMAS[i], RUNS[i], SIGMAS[i] == 0.035);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
