// prim_lut4_l: 4-input look-up table with a local output.
//
// The output is the INIT bit addressed by the four inputs, i = {I3,I2,I1,I0}.
// Combinational, no timing of its own. The function and the name follow the
// LUT4_L primitive; the INIT bit order is the usual LUT convention.
module prim_lut4_l #(
  parameter logic [15:0] INIT = 16'h0000
) (
  input  logic [3:0] i,
  output logic       lo
);
  always_comb lo = INIT[i];
endmodule
