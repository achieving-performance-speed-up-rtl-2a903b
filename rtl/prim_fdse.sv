// prim_fdse: D flip-flop with clock enable and synchronous set.
//
// On a rising clock edge: s=1 forces q to 1 whatever ce is; otherwise ce=1
// loads d; otherwise q holds. The set-over-enable priority follows the FDSE
// primitive. INIT is the power-up value (1 here, as for a set-type flop; this
// value is a choice of this design).
module prim_fdse #(
  parameter logic INIT = 1'b1
) (
  input  logic c,
  input  logic ce,
  input  logic s,
  input  logic d,
  output logic q = INIT
);
  always_ff @(posedge c) begin
    if (s)       q <= 1'b1;
    else if (ce) q <= d;
  end
endmodule
