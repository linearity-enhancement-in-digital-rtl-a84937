// sub_array: one ROWS x COLS sub-array of unit cells (8 x 8 = 64 cells).
//
// Every cell of row r sees the row rails rails[r] (previous row full) and
// rails[r+1] (own row full); every cell of column c sees the shared column
// line col[c]. With thermometer rails the rows below the partial row are all
// on and the partial row has as many cells on as col has high lines, so the
// cells fill row by row from cell 0. Output bit on[r*COLS+c] is the state of
// the cell in row r, column c, and on_n[r*COLS+c] its complementary switch.
// The array size and the cell rule follow the architecture; the cell
// numbering is this design's own. Combinational.
module sub_array
  import mdac_pkg::*;
#(
  parameter int unsigned ROWS = SUB_ROWS,
  parameter int unsigned COLS = SUB_COLS
) (
  input  logic [ROWS:0]        rails,  // R_-1 .. R_ROWS-1
  input  logic [COLS-1:0]      col,    // column lines C0 .. C_COLS-1
  output logic [ROWS*COLS-1:0] on,     // cell steers to Iop
  output logic [ROWS*COLS-1:0] on_n    // cell steers to Ion
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      unit_cell u_cell (
        .r_prev (rails[r]),
        .r_own  (rails[r+1]),
        .col    (col[c]),
        .sw_p   (on[r*COLS+c]),
        .sw_n   (on_n[r*COLS+c])
      );
    end
  end

endmodule
