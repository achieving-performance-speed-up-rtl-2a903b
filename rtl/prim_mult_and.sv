// prim_mult_and: the dedicated AND gate of a fast-carry multiplier.
//
// lo = i0 & i1, the partial product a_i*b_j. It feeds the data input of a
// carry multiplexer (prim_muxcy_l) so that the generate term of a
// multiplier-adder bit needs no look-up table. Combinational.
module prim_mult_and (
  input  logic i0,
  input  logic i1,
  output logic lo
);
  always_comb lo = i0 & i1;
endmodule
