// mdac_top: 8-bit unary current-steering DAC with the four-sub-array
// decoder and a selectable index pattern.
//
// The digital decoder (dac_core) turns the registered code into the switch
// states of 256 unit cells; the behavioural current-source model
// (current_array) sums the unit currents into the differential outputs Iop
// and Ion. The unit currents, i.e. the nominal value and each cell's random
// mismatch, come in on 'unit_current', because in silicon they are a
// property of the fabricated array rather than a signal. After fabrication
// every built-in index pattern can be measured and the most linear one kept
// on 'pattern_sel'. Timing: iop/ion reflect 'code' and 'pattern_sel' one
// clock edge after they are presented. The split into levels, rows and
// columns follows the architecture; integer currents and the input register
// are this design's own.
module mdac_top
  import mdac_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 4,
  parameter int unsigned SEL_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1,
  parameter int unsigned CUR_W = 16,
  parameter int unsigned OUT_W = CUR_W + $clog2(N_CELLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_BITS-1:0]  code,                      // M1..M8
  input  logic [SEL_W-1:0]   pattern_sel,               // index pattern
  input  logic [CUR_W-1:0]   unit_current [N_CELLS],    // per-cell source current
  output logic [N_CELLS-1:0] cell_on,                   // switch states
  output logic [OUT_W-1:0]   iop,
  output logic [OUT_W-1:0]   ion
);

  logic [N_CELLS-1:0] cell_on_n;

  dac_core #(.NUM_PATTERNS(NUM_PATTERNS), .SEL_W(SEL_W)) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .code        (code),
    .pattern_sel (pattern_sel),
    .cell_on     (cell_on),
    .cell_on_n   (cell_on_n)
  );

  current_array #(.CELLS(N_CELLS), .CUR_W(CUR_W), .OUT_W(OUT_W)) u_cur (
    .on           (cell_on),
    .on_n         (cell_on_n),
    .unit_current (unit_current),
    .iop          (iop),
    .ion          (ion)
  );

endmodule
