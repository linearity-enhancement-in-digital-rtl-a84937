// unit_cell: local decode logic of one unary current cell.
//
// Row-column decoding leaves the final decision to each cell: the cell in
// row j, column i steers its current to the positive output when its own row
// is full (R_j) or when the previous row is full and its column line is
// high (R_j-1 AND C_i), i.e. on = R_j + R_j-1 * C_i. 'sw_p' drives the switch
// to the positive output Iop and 'sw_n' the complementary switch to Ion.
// Combinational; the gate structure is the architecture's own.
module unit_cell (
  input  logic r_prev,  // R_j-1: previous row full
  input  logic r_own,   // R_j:   own row full
  input  logic col,     // C_i:   column thermometer line
  output logic sw_p,    // current to Iop
  output logic sw_n     // current to Ion
);

  assign sw_p = r_own | (r_prev & col);
  assign sw_n = ~sw_p;

endmodule
