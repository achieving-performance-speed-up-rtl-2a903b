// prim_xorcy: carry-chain XOR giving the sum bit of a fast adder.
//
// o = li ^ ci, where li is the bit's propagate and ci the carry arriving on the
// chain. Combinational.
module prim_xorcy (
  input  logic ci,
  input  logic li,
  output logic o
);
  always_comb o = li ^ ci;
endmodule
