// prim_carry4: fast carry logic of one slice, four bits.
//
// Four carry multiplexers and four XOR gates in a chain starting at ci:
//   c[0] = ci, co[k] = s[k] ? c[k] : di[k], c[k+1] = co[k], o[k] = s[k] ^ c[k].
// With s the per-bit propagate (from a LUT) and di the generate value, o is the
// sum and co[3] the carry out of a 4-bit adder; co[k] brings out the carry of
// each stage so that a chain can end mid-block. Combinational. Built from the
// one-bit multiplexer and XOR elements; the separate carry-init input of the
// vendor part is left out.
module prim_carry4 (
  input  logic       ci,
  input  logic [3:0] di,
  input  logic [3:0] s,
  output logic [3:0] o,
  output logic [3:0] co
);
  logic [3:0] c;  // carry into each stage
  assign c = {co[2:0], ci};
  for (genvar k = 0; k < 4; k++) begin : g_bit
    prim_muxcy_l u_mux (.ci(c[k]), .di(di[k]), .s(s[k]), .lo(co[k]));
    prim_xorcy   u_xor (.ci(c[k]), .li(s[k]), .o(o[k]));
  end
endmodule
