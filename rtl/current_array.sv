// current_array: behavioural model of the unit current sources and their
// differential steering switches (an analog part, not synthesizable logic
// in a real chip).
//
// Every one of the N_CELLS unit cells owns a current source whose value is
// given on 'unit_current' as an unsigned integer (the nominal unit current
// plus that cell's random mismatch, in any fixed unit chosen by the user).
// A cell whose 'on' switch is closed adds its current to the positive
// output Iop, one whose 'on_n' switch is closed adds it to Ion. The outputs
// are the two summed currents in the same unit, settled in zero time.
// Modelling currents as integers instead of reals is this model's own
// choice; it keeps the sums exact and comparable in a testbench.
module current_array
  import mdac_pkg::*;
#(
  parameter int unsigned CELLS = N_CELLS,
  parameter int unsigned CUR_W = 16,                    // bits of one unit current
  parameter int unsigned OUT_W = CUR_W + $clog2(CELLS)  // bits of a summed output
) (
  input  logic [CELLS-1:0] on,                        // switch to Iop closed
  input  logic [CELLS-1:0] on_n,                      // switch to Ion closed
  input  logic [CUR_W-1:0] unit_current [CELLS],      // current of each source
  output logic [OUT_W-1:0] iop,                       // positive output current
  output logic [OUT_W-1:0] ion                        // negative output current
);

  always_comb begin
    iop = '0;
    ion = '0;
    for (int unsigned k = 0; k < CELLS; k++) begin
      if (on[k])   iop = iop + OUT_W'(unit_current[k]);
      if (on_n[k]) ion = ion + OUT_W'(unit_current[k]);
    end
  end

endmodule
