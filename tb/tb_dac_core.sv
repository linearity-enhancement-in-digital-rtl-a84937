// tb_dac_core: self-check of the digital decoder. For every index pattern
// and every code 0..255 it checks, one clock edge after the code is
// presented, that exactly the expected cells are on: with level order
// perm[k*24/N] the cell in row r, column c of sub-array s is on when
// 64*level(s) + 8*r + c < code. It also checks that the outputs hold until
// the clock edge (one cycle of latency) and that reset clears the code.
module tb_dac_core;
  import mdac_pkg::*;
  int checks = 0, failures = 0;
  int perm [24][4];
  int lvl_of [24][4];

  logic clk = 0, rst_n = 1;
  logic [7:0] code;
  logic [1:0] sel;
  logic [255:0] cell_on, cell_on_n;

  dac_core dut (.clk(clk), .rst_n(rst_n), .code(code), .pattern_sel(sel),
                .cell_on(cell_on), .cell_on_n(cell_on_n));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] expected(int k, int v);
    logic [255:0] e;
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 64; p++)
        e[s*64+p] = (64 * lvl_of[k][s] + p) < v;
    return e;
  endfunction

  initial begin
    int n;
    logic [255:0] prev;
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
    code = 8'd200;
    sel  = 2'd1;
    #1 rst_n = 0;
    #1;
    checks++;
    if (cell_on !== '0) begin
      failures++;
      $display("FAIL cells on during reset");
    end
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      for (int v = 0; v < 256; v++) begin
        @(negedge clk);
        prev = cell_on;
        code = 8'(v);
        sel  = 2'(p);
        #1;
        checks++;
        if (cell_on !== prev) begin
          failures++;
          $display("FAIL outputs changed before the clock edge");
        end
        @(negedge clk);
        checks++;
        if (cell_on !== expected(p * 6, v)) begin
          failures++;
          $display("FAIL pattern %0d code %0d: %0d cells on", p, v, $countones(cell_on));
        end
        checks++;
        if (cell_on_n !== ~cell_on) begin
          failures++;
          $display("FAIL complementary switches pattern %0d code %0d", p, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
