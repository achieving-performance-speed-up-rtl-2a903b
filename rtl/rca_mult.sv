// rca_mult: unsigned W x W bit-parallel ripple-carry array multiplier.
//
// Row 0 is the partial product A AND b0; its low bit is product bit 0 and its
// upper W-1 bits go on to row 1. Row j (1..W-1) is a W-bit carry-propagate
// adder (row_adder) that adds A AND bj to the W bits handed down by row j-1:
// its low sum bit is product bit j, and its carry out with the remaining sum
// bits is handed to row j+1. The last row gives product bits W..2W-1. The
// critical path ripples through every row, which is why the fast-carry styles
// help this structure most. Fully combinational: one product per evaluation,
// no latency of its own.
// STYLE selects how each row is built (see row_adder). In the DSP style row 0
// also passes through a slice (adding zero), so the array uses W slices.
// The row arrangement follows the partial-product table of the described
// design; treating the operands as unsigned is this design's choice (the
// Baugh-Wooley multiplier covers two's complement operands).
module rca_mult
  import mult_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter style_e      STYLE = ST_LUT6_2
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  // acc[j]: the W bits row j hands down to row j+1 (weights j+1 .. j+W).
  logic [W-1:0] acc [W];

  if (STYLE == ST_DSP48) begin : g_row0_dsp
    logic [W-1:0] s0;
    logic         c0;
    row_adder #(.N(W), .STYLE(STYLE)) u_row0 (
      .x('0), .a(a), .b(b[0]), .cin(1'b0), .s(s0), .cout(c0)
    );
    assign p[0]   = s0[0];
    assign acc[0] = {c0, s0[W-1:1]};
  end else begin : g_row0
    logic [W-1:0] pp0;
    assign pp0    = a & {W{b[0]}};
    assign p[0]   = pp0[0];
    assign acc[0] = {1'b0, pp0[W-1:1]};
  end

  for (genvar j = 1; j < W; j++) begin : g_row
    logic [W-1:0] s;
    logic         c;
    row_adder #(.N(W), .STYLE(STYLE)) u_row (
      .x(acc[j-1]), .a(a), .b(b[j]), .cin(1'b0), .s(s), .cout(c)
    );
    assign p[j]   = s[0];
    assign acc[j] = {c, s[W-1:1]};
  end

  assign p[2*W-1:W] = acc[W-1];
endmodule
