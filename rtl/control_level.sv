// control_level: one primary control level of the segmented decoder.
//
// The two most significant code bits M1,M2 divide full scale into four
// levels. Control level LEVEL (0 = A .. 3 = D) produces the row rails of the
// sub-array it is wired to:
//   * rail[0], the "previous row" signal of the first row, is high when all
//     lower levels are full (A: VDD, B: M1+M2, C: M1, D: M1*M2);
//   * rail[8], the full-on signal of the last row, is high when this level
//     itself is full (A: M1+M2, B: M1, C: M1*M2, D: ground);
//   * rail[k+1] for rows k = 0..6 combines the row thermometer line T_k with
//     M1,M2: A: T+M1+M2, B: T*M2+M1, C: T*M1+M1*M2, D: T*M1*M2.
// So a level above the code's level is all off, a level below it all on, and
// the level equal to it follows the row thermometer. These gate equations
// are the architecture's own; the module is combinational.
module control_level
  import mdac_pkg::*;
#(
  parameter int unsigned LEVEL = 0
) (
  input  logic                m1,   // code MSB
  input  logic                m2,   // second code bit
  input  logic [SUB_ROWS-2:0] t,    // row thermometer T0..T6
  output row_rails_t          rails
);

  logic m1_or_m2, m1_and_m2;
  assign m1_or_m2  = m1 | m2;
  assign m1_and_m2 = m1 & m2;

  always_comb begin
    unique case (LEVEL)
      0: begin
        rails[0]          = 1'b1;
        rails[SUB_ROWS-1:1] = t | {(SUB_ROWS-1){m1_or_m2}};
        rails[SUB_ROWS]   = m1_or_m2;
      end
      1: begin
        rails[0]          = m1_or_m2;
        rails[SUB_ROWS-1:1] = (t & {(SUB_ROWS-1){m2}}) | {(SUB_ROWS-1){m1}};
        rails[SUB_ROWS]   = m1;
      end
      2: begin
        rails[0]          = m1;
        rails[SUB_ROWS-1:1] = (t & {(SUB_ROWS-1){m1}}) | {(SUB_ROWS-1){m1_and_m2}};
        rails[SUB_ROWS]   = m1_and_m2;
      end
      default: begin
        rails[0]          = m1_and_m2;
        rails[SUB_ROWS-1:1] = t & {(SUB_ROWS-1){m1_and_m2}};
        rails[SUB_ROWS]   = 1'b0;
      end
    endcase
  end

endmodule
