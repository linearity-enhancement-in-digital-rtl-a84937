// index_mux: index interface between the control levels and the sub-arrays.
//
// The four sub-arrays are identical, so any control level may drive any of
// them. This multiplexer stands for the intermediate row switches: for each
// physical sub-array it selects the row rails of one control level, the
// choice being fixed by the index pattern 'sel'. NUM_PATTERNS patterns are
// built in (the architecture suggests a restricted set of 4 or 8 out of the
// 4! = 24 orders); pattern k is permutation number k*24/NUM_PATTERNS in
// lexicographic order (see mdac_pkg), so pattern 0 is the conventional
// A-B-C-D order. That choice of permutations, and mapping an out-of-range
// 'sel' to pattern 0, are this design's own. 'sel' is meant to be set once
// after test and held; the path is combinational.
module index_mux
  import mdac_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 4,
  parameter int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic [SEL_W-1:0] sel,                 // index pattern
  input  row_rails_t       lvl_rails [N_SUB],   // rails of control levels A..D
  output row_rails_t       sub_rails [N_SUB]    // rails of sub-arrays A..D
);

  // Pattern table: control level that feeds each sub-array, per pattern.
  logic [LVL_BITS-1:0] lvl_tab [NUM_PATTERNS][N_SUB];

  for (genvar p = 0; p < NUM_PATTERNS; p++) begin : g_pat
    for (genvar s = 0; s < N_SUB; s++) begin : g_sub
      localparam int unsigned LVL = level_of_sub(p, s, NUM_PATTERNS);
      assign lvl_tab[p][s] = LVL[LVL_BITS-1:0];
    end
  end

  logic [SEL_W-1:0] pat;
  assign pat = (32'(sel) < NUM_PATTERNS) ? sel : '0;

  always_comb begin
    for (int unsigned s = 0; s < N_SUB; s++)
      sub_rails[s] = lvl_rails[lvl_tab[pat][s]];
  end

endmodule
