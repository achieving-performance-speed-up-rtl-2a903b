// prim_muxcy_l: one-bit carry multiplexer of a fast carry chain.
//
// lo = s ? ci : di. With s the propagate of a bit (carry passes through) and di
// its generate value (used when the bit does not propagate), a chain of these
// forms a ripple adder's carry path on dedicated routing. Combinational.
module prim_muxcy_l (
  input  logic ci,
  input  logic di,
  input  logic s,
  output logic lo
);
  always_comb lo = s ? ci : di;
endmodule
