// dac_core: digital decoder of the 8-bit unary DAC with four sub-arrays.
//
// The code M1..M8 (code[7] = M1) and the index pattern are captured in an
// input register on the rising clock edge. From the registered code:
//   * the column decoder turns M6..M8 into column lines C0..C6, shared by all
//     sub-arrays (the eighth column line C7 is tied low, so the last cell of a
//     row only turns on through its row rail);
//   * the row decoder turns M3..M5 into row lines T0..T6, shared by all
//     control levels;
//   * four control levels A..D combine T with M1,M2 into the row rails;
//   * the index interface multiplexer hands each control level's rails to
//     the sub-array chosen by the index pattern;
//   * four 8 x 8 sub-arrays of unit cells decode rails and columns locally.
// For code v exactly v cells are on: all cells of the sub-arrays driven by
// the levels below v/64, and v%64 cells, filled row by row, of the sub-array
// driven by level v/64. cell_on[s*64 + r*8 + c] is the cell in row r,
// column c of physical sub-array s (0 = A .. 3 = D); cell_on_n is its
// complement. Latency: the cell switches follow a code one clock edge after
// it is presented. An assertion checks that the number of cells on equals
// the registered code. The decoder split, the control level logic and the cell
// logic follow the architecture; the input register, its reset to code 0 /
// pattern 0 and the tied column line C7 are this design's own choices.
module dac_core
  import mdac_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 4,
  parameter int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,        // asynchronous, active low
  input  logic [N_BITS-1:0]  code,         // M1..M8, code[7] = M1
  input  logic [SEL_W-1:0]   pattern_sel,  // index pattern
  output logic [N_CELLS-1:0] cell_on,      // switch to Iop per unit cell
  output logic [N_CELLS-1:0] cell_on_n     // switch to Ion per unit cell
);

  logic [N_BITS-1:0] code_q;
  logic [SEL_W-1:0]  sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q <= '0;
      sel_q  <= '0;
    end else begin
      code_q <= code;
      sel_q  <= pattern_sel;
    end
  end

  logic m1, m2;
  assign m1 = code_q[N_BITS-1];
  assign m2 = code_q[N_BITS-2];

  logic [SUB_ROWS-2:0] t_lines;
  logic [SUB_COLS-2:0] c_lines;
  logic [SUB_COLS-1:0] col;

  therm_decoder #(.IN_W(ROW_BITS)) u_row_dec (
    .bin   (code_q[COL_BITS +: ROW_BITS]),
    .therm (t_lines)
  );

  therm_decoder #(.IN_W(COL_BITS)) u_col_dec (
    .bin   (code_q[COL_BITS-1:0]),
    .therm (c_lines)
  );

  assign col = {1'b0, c_lines};

  row_rails_t lvl_rails [N_SUB];
  row_rails_t sub_rails [N_SUB];

  for (genvar l = 0; l < N_SUB; l++) begin : g_lvl
    control_level #(.LEVEL(l)) u_lvl (
      .m1    (m1),
      .m2    (m2),
      .t     (t_lines),
      .rails (lvl_rails[l])
    );
  end

  index_mux #(.NUM_PATTERNS(NUM_PATTERNS), .SEL_W(SEL_W)) u_mux (
    .sel       (sel_q),
    .lvl_rails (lvl_rails),
    .sub_rails (sub_rails)
  );

  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    sub_array #(.ROWS(SUB_ROWS), .COLS(SUB_COLS)) u_sub (
      .rails (sub_rails[s]),
      .col   (col),
      .on    (cell_on[s*SUB_CELLS +: SUB_CELLS]),
      .on_n  (cell_on_n[s*SUB_CELLS +: SUB_CELLS])
    );
  end

  // The number of cells switched to Iop always equals the registered code.
  a_cell_count: assert property (@(posedge clk) disable iff (!rst_n)
                                 $countones(cell_on) == int'(code_q))
    else $error("dac_core: %0d cells on for code %0d", $countones(cell_on), code_q);

endmodule
