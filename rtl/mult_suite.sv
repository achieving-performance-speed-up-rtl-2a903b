// mult_suite: the three bit-parallel multipliers in all five primitive styles.
//
// One ripple-carry array (unsigned), one carry-save array (unsigned) and one
// Baugh-Wooley array (two's complement) per style, fifteen multipliers in all,
// share the operand inputs a and b. Each has its own 2W-bit capture register
// of FDSE flip-flops (fdse_reg) on clk, ce and set. Index s of every output
// array is the style mult_pkg::style_e'(s): 0 LUT4_L, 1 LUT6_2, 2 CARRY4,
// 3 MULT_AND/MUXCY_L/XORCY, 4 DSP48.
// Timing: operands presented before a rising edge with ce=1 appear on all
// outputs after that edge; a new operand pair can be taken every cycle. ce=0
// holds the products; set=1 loads all ones on the next edge whatever ce is.
// Building every structure in every style side by side is this design's
// choice: the described design compares the styles and does not single one out.
module mult_suite
  import mult_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           ce,
  input  logic           set,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p_rca [NSTYLE],
  output logic [2*W-1:0] p_csa [NSTYLE],
  output logic [2*W-1:0] p_bw  [NSTYLE]
);
  for (genvar s = 0; s < NSTYLE; s++) begin : g_style
    localparam style_e ST = style_e'(s);
    logic [2*W-1:0] rca_d, csa_d, bw_d;

    rca_mult #(.W(W), .STYLE(ST)) u_rca (.a(a), .b(b), .p(rca_d));
    csa_mult #(.W(W), .STYLE(ST)) u_csa (.a(a), .b(b), .p(csa_d));
    bw_mult  #(.W(W), .STYLE(ST)) u_bw  (.a(a), .b(b), .p(bw_d));

    fdse_reg #(.N(2*W)) u_rca_q (.clk(clk), .ce(ce), .set(set), .d(rca_d), .q(p_rca[s]));
    fdse_reg #(.N(2*W)) u_csa_q (.clk(clk), .ce(ce), .set(set), .d(csa_d), .q(p_csa[s]));
    fdse_reg #(.N(2*W)) u_bw_q  (.clk(clk), .ce(ce), .set(set), .d(bw_d),  .q(p_bw[s]));
  end
endmodule
