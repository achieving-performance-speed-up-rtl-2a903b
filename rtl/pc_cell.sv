// pc_cell: processing cell of the array multipliers.
//
// Forms the partial product pp = a&b (inverted when INV=1, as the Baugh-Wooley
// array needs for its sign row and sign column) and adds it to the two bits y
// and z: s = pp^y^z, c = majority(pp,y,z). Combinational.
// USE_LUT6=0 builds the cell from two 4-input LUTs, one for the sum and one for
// the carry; USE_LUT6=1 builds it from one dual-output LUT with the sum on O6
// and the carry on O5 (I5 held high, I4 unused). The LUT contents are computed
// from the cell equations in mult_pkg. The one-LUT and two-LUT forms follow
// the design being described; the pin assignment is this design's choice.
module pc_cell
  import mult_pkg::*;
#(
  parameter bit USE_LUT6 = 1'b1,
  parameter bit INV      = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  if (USE_LUT6) begin : g_lut6
    prim_lut6_2 #(.INIT(cell_init6(INV))) u_lut (
      .i ({1'b1, 1'b0, z, y, b, a}), .o6(s), .o5(c)
    );
  end else begin : g_lut4
    prim_lut4_l #(.INIT(cell_sum_init4(INV)))   u_sum   (.i({z, y, b, a}), .lo(s));
    prim_lut4_l #(.INIT(cell_carry_init4(INV))) u_carry (.i({z, y, b, a}), .lo(c));
  end
endmodule
