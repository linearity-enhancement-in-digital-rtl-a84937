// therm_decoder: binary-to-thermometer decoder.
//
// A plain IN_W-bit binary code 'bin' becomes 2**IN_W-1 thermometer lines:
// therm[i] is high when bin > i, so the number of high lines equals the
// code. In the DAC two instances are used with IN_W = 3, as the "3 x 7"
// decoders of the architecture: the row decoder (bits M3..M5, lines T0..T6)
// and the column decoder (bits M6..M8, lines C0..C6). The decoder is purely
// combinational; its gate-level form is left to synthesis.
module therm_decoder #(
  parameter int unsigned IN_W = 3
) (
  input  logic [IN_W-1:0]        bin,
  output logic [(1<<IN_W)-2:0]   therm
);

  always_comb begin
    for (int unsigned i = 0; i < (1 << IN_W) - 1; i++)
      therm[i] = (bin > i[IN_W-1:0]);
  end

endmodule
