// mdac_pkg: constants and helpers shared by the segmented-decoder DAC.
//
// The converter is an 8-bit fully unary current-steering DAC whose 16x16
// unit-cell array is split into four 8x8 sub-arrays. The code word is
// M1..M8 with M1 the most significant bit: M1,M2 pick the sub-array level
// (the "primary control level"), M3..M5 drive the row thermometer decoder
// and M6..M8 the column thermometer decoder. These splits and sizes follow
// the published architecture.
//
// The order in which the four control levels are wired to the four
// physical sub-arrays is selectable. An "index pattern" is a permutation of
// the sub-arrays; pattern k of a design with NUM_PATTERNS patterns uses the
// permutation number k*24/NUM_PATTERNS in lexicographic order of the 4! = 24
// permutations, so pattern 0 is always the conventional in-order wiring.
// Which permutations are offered is this design's own choice; the
// architecture only says that a restricted set (4 or 8) is built in.
package mdac_pkg;

  localparam int unsigned N_BITS   = 8;   // resolution of the unary DAC
  localparam int unsigned LVL_BITS = 2;   // M1,M2: sub-array level select
  localparam int unsigned ROW_BITS = 3;   // M3..M5: row decoder input
  localparam int unsigned COL_BITS = 3;   // M6..M8: column decoder input
  localparam int unsigned N_SUB    = 1 << LVL_BITS;   // 4 sub-arrays
  localparam int unsigned SUB_ROWS = 1 << ROW_BITS;   // 8 rows per sub-array
  localparam int unsigned SUB_COLS = 1 << COL_BITS;   // 8 columns per sub-array
  localparam int unsigned SUB_CELLS = SUB_ROWS * SUB_COLS;  // 64
  localparam int unsigned N_CELLS  = N_SUB * SUB_CELLS;     // 256
  localparam int unsigned N_PERMS  = 24;  // 4! wirings of levels to sub-arrays

  // Row rails of one sub-array: rail[0] is the "previous row" signal of the
  // first row (R_-1), rail[k+1] is R_k, the full-on signal of row k; rail[8]
  // is the full-on signal of the last row.
  typedef logic [SUB_ROWS:0] row_rails_t;

  // Sub-array that control level 'lvl' drives under lexicographic
  // permutation number 'perm' of {0,1,2,3} (factorial number system).
  function automatic int unsigned perm_sub_of_level(int unsigned perm, int unsigned lvl);
    int unsigned avail [N_SUB];
    int unsigned rest, fact, n_left, pick, result;
    for (int unsigned i = 0; i < N_SUB; i++) avail[i] = i;
    rest   = perm % N_PERMS;
    fact   = N_PERMS / N_SUB;   // 3! = 6
    n_left = N_SUB;
    result = 0;
    for (int unsigned pos = 0; pos < N_SUB; pos++) begin
      pick = rest / fact;
      rest = rest % fact;
      if (pos == lvl) result = avail[pick];
      for (int unsigned j = pick; j + 1 < n_left; j++) avail[j] = avail[j+1];
      n_left = n_left - 1;
      if (n_left > 1) fact = fact / n_left;
    end
    return result;
  endfunction

  // Control level wired to sub-array 'sub' under index pattern 'pat' of a
  // design offering 'num_patterns' patterns.
  function automatic int unsigned level_of_sub(int unsigned pat, int unsigned sub,
                                               int unsigned num_patterns);
    int unsigned perm;
    int unsigned result;
    perm   = (pat * N_PERMS) / num_patterns;
    result = 0;
    for (int unsigned l = 0; l < N_SUB; l++)
      if (perm_sub_of_level(perm, l) == sub) result = l;
    return result;
  endfunction

endpackage
