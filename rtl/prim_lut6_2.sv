// prim_lut6_2: 6-input look-up table with two outputs.
//
// O6 is the INIT bit addressed by all six inputs. O5 is addressed by the lower
// five inputs within the lower half of INIT. With I5 held high the part gives
// two independent 5-input functions of the same inputs (upper half on O6, lower
// half on O5); with I5 used, O6 is a 6-input function and O5 a 5-input one.
// Combinational. The two-output behaviour follows the LUT6_2 primitive; which
// half feeds O5 is the usual convention.
module prim_lut6_2 #(
  parameter logic [63:0] INIT = 64'h0
) (
  input  logic [5:0] i,
  output logic       o6,
  output logic       o5
);
  always_comb begin
    o6 = INIT[i];
    o5 = INIT[{1'b0, i[4:0]}];
  end
endmodule
