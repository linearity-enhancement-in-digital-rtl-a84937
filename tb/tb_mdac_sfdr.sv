// tb_mdac_sfdr: spurious-free dynamic range of the DAC with and without a
// choice of index pattern.
//
// For each relative mismatch sigma and each of RUNS draws of unit currents,
// the default DAC (4 index patterns) is driven with a full-scale coherent
// sine of J periods in M samples, one sample per clock, under every
// pattern. The output Iop is transformed with a plain DFT and the SFDR is
// the power of the signal bin over the largest other bin up to M/2. The
// conventional converter is pattern 0; the proposed one keeps the pattern
// with the highest SFDR. Averages are printed next to the first-order
// estimate 20log(3*pi/4) + 3N - 20log(sigma).
//
// Checks: every Iop sample equals the reference sum of the cells that the
// pattern's level order turns on; the best pattern is never worse than
// pattern 0; over all runs at a given sigma the best pattern must raise the
// average SFDR; and with no mismatch all patterns must give the same output.
module tb_mdac_sfdr;
  import mdac_pkg::*;
  localparam int M = 1024;       // samples per record
  localparam int J = 31;         // signal periods per record (coherent)
  localparam int RUNS = 200;
  localparam int N_SIGMA = 3;
  localparam real SIGMAS [N_SIGMA] = '{0.020, 0.035, 0.050};
  localparam int I_UNIT = 10000;
  localparam real PI = 3.141592653589793;

  int checks = 0, failures = 0;
  int lvl_of [24][4];
  real cos_t [M], sin_t [M];
  int sine_code [M];

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
    repeat ((N_SIGMA * RUNS + 1) * 4 * (M + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic longint ref_iop(int k, int v);
    longint sum;
    sum = 0;
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 64; p++)
        if ((64 * lvl_of[k][s] + p) < v) sum += longint'(cur[s*64+p]);
    return sum;
  endfunction

  function automatic real sfdr_db(real x [M]);
    real mean, pw, sig, spur, re, im;
    mean = 0.0;
    for (int n = 0; n < M; n++) mean += x[n];
    mean = mean / M;
    sig = 0.0;
    spur = 0.0;
    for (int k = 1; k < M / 2; k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < M; n++) begin
        re += (x[n] - mean) * cos_t[(k * n) % M];
        im -= (x[n] - mean) * sin_t[(k * n) % M];
      end
      pw = re * re + im * im;
      if (k == J) sig = pw;
      else if (pw > spur) spur = pw;
    end
    return 10.0 * $log10(sig / spur);
  endfunction

  // Drive one sine record under pattern p and return the measured samples.
  task automatic record(int p, output real x [M]);
    @(negedge clk);
    sel  = 2'(p);
    code = 8'(sine_code[0]);
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      x[n] = real'(iop);
      if (n % 61 == 0 || n < 8) begin
        checks++;
        if (longint'(iop) != ref_iop(p * 6, sine_code[n])) begin
          failures++;
          $display("FAIL pattern %0d sample %0d: Iop=%0d expected %0d",
                   p, n, iop, ref_iop(p * 6, sine_code[n]));
        end
      end
      code = 8'(sine_code[(n + 1) % M]);
    end
  endtask

  initial begin
    int n;
    real x [M], x0 [M];
    n = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d) begin
              lvl_of[n][a] = 0; lvl_of[n][b] = 1; lvl_of[n][c] = 2; lvl_of[n][d] = 3;
              n++;
            end
    for (int i = 0; i < M; i++) begin
      cos_t[i] = $cos(2.0 * PI * i / M);
      sin_t[i] = $sin(2.0 * PI * i / M);
      sine_code[i] = $rtoi($floor(127.5 + 127.5 * $sin(2.0 * PI * J * i / M) + 0.5));
    end
    #1 rst_n = 0;
    #1 rst_n = 1;

    // No mismatch: the order of the sub-arrays cannot matter.
    for (int k = 0; k < N_CELLS; k++) cur[k] = 16'(I_UNIT);
    record(0, x0);
    for (int p = 1; p < 4; p++) begin
      record(p, x);
      checks++;
      if (x != x0) begin
        failures++;
        $display("FAIL ideal currents: pattern %0d output differs from pattern 0", p);
      end
    end

    for (int si = 0; si < N_SIGMA; si++) begin
      real sum_conv, sum_best, est;
      sum_conv = 0.0;
      sum_best = 0.0;
      for (int run = 0; run < RUNS; run++) begin
        real s0, best, sp;
        for (int k = 0; k < N_CELLS; k++)
          cur[k] = 16'($rtoi(real'(I_UNIT) * (1.0 + SIGMAS[si] * gauss()) + 0.5));
        record(0, x);
        s0 = sfdr_db(x);
        best = s0;
        for (int p = 1; p < 4; p++) begin
          record(p, x);
          sp = sfdr_db(x);
          if (sp > best) best = sp;
        end
        checks++;
        if (best < s0) begin
          failures++;
          $display("FAIL best pattern worse than pattern 0");
        end
        sum_conv += s0;
        sum_best += best;
      end
      est = 20.0 * $log10(3.0 * PI / 4.0) + 3.0 * N_BITS - 20.0 * $log10(SIGMAS[si]);
      $display("sigma_rel = %.3f: mean SFDR conventional %.1f dB, best of 4 patterns %.1f dB, estimate %.1f dB (%0d runs)",
               SIGMAS[si], sum_conv / RUNS, sum_best / RUNS, est, RUNS);
      checks++;
      if (!(sum_best > sum_conv)) begin
        failures++;
        $display("FAIL choosing a pattern did not raise the mean SFDR");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
