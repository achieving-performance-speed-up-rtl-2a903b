// fdse_reg: capture register of a multiplier, N FDSE flip-flops in parallel.
//
// All bits share clock, clock enable and synchronous set (set has priority and
// loads all ones). q follows d one rising edge after ce is seen high. Each
// multiplier of the suite registers its 2W-bit product here, which for W=16
// gives the 32 registers per structure reported for the FPGA builds; placing
// the register on the product rather than on the operands is this design's
// choice.
module fdse_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         set,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  for (genvar k = 0; k < N; k++) begin : g_ff
    prim_fdse #(.INIT(1'b0)) u_ff (.c(clk), .ce(ce), .s(set), .d(d[k]), .q(q[k]));
  end
endmodule
