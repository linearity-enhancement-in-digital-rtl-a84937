// tb_sub_array: self-check of one 8 x 8 sub-array. It applies every
// thermometer combination of row rails (0..9 high from the bottom) and
// column lines (0..8 high), and expects the cells to fill row by row: with
// n rails high and c column lines high, the first 8*(n-1)+c cells are on
// (all 64 when all nine rails are high, none when no rail is high).
// Random non-thermometer inputs are checked against the per-cell rule.
module tb_sub_array;
  int checks = 0, failures = 0;
  logic [8:0]  rails;
  logic [7:0]  col;
  logic [63:0] on, on_n;

  sub_array #(.ROWS(8), .COLS(8)) dut (.rails(rails), .col(col), .on(on), .on_n(on_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 9; n++) begin
      for (int c = 0; c <= 8; c++) begin
        int count;
        logic [63:0] exp_on;
        rails = 9'((1 << n) - 1);
        col   = 8'((1 << c) - 1);
        #1;
        if (n == 0)      count = 0;
        else if (n == 9) count = 64;
        else             count = 8 * (n - 1) + c;
        exp_on = (count == 64) ? '1 : ((64'd1 << count) - 64'd1);
        checks++;
        if (on !== exp_on) begin
          failures++;
          $display("FAIL rails=%b col=%b on=%h expected %h", rails, col, on, exp_on);
        end
        checks++;
        if (on_n !== ~exp_on) begin
          failures++;
          $display("FAIL rails=%b col=%b on_n=%h", rails, col, on_n);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      rails = 9'($urandom);
      col   = 8'($urandom);
      #1;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          logic e;
          e = rails[r+1] | (rails[r] & col[c]);
          checks++;
          if (on[r*8+c] !== e) begin
            failures++;
            $display("FAIL random rails=%b col=%b cell r=%0d c=%0d", rails, col, r, c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
