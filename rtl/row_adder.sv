// row_adder: N-bit adder s + cout = x + (a AND b) + cin, in one primitive style.
//
// This is the carry-propagate adder of the suite: every row of the ripple-carry
// array multiplier (a = multiplicand, b = one multiplier bit) and the vector
// merging adder of the carry-save arrays (b = 1). Combinational.
//   ST_LUT4_L, ST_LUT6_2: a chain of processing cells (pc_cell), the carry
//     rippling through general routing from cell to cell.
//   ST_CARRY4: a 4-input LUT per bit gives the propagate (a&b)^x, x is the
//     generate value, and ceil(N/4) four-bit fast carry blocks do the rest.
//   ST_MULTAND: the same per bit with MULT_AND giving the generate value a&b,
//     MUXCY_L the carry and XORCY the sum (the fast carry of the older family).
//   ST_DSP48: the AND gating is plain logic and one arithmetic slice adds the
//     row (N <= 35).
// When a bit does not propagate, x and a&b are equal, so either can serve as
// the generate value. Which primitive does which part follows the described
// design; the propagate/generate pairing is this design's choice.
module row_adder
  import mult_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter style_e      STYLE = ST_LUT6_2
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] a,
  input  logic         b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  if (STYLE == ST_LUT4_L || STYLE == ST_LUT6_2) begin : g_cells
    logic [N:0] c;
    assign c[0] = cin;
    for (genvar k = 0; k < N; k++) begin : g_cell
      pc_cell #(.USE_LUT6(STYLE == ST_LUT6_2), .INV(1'b0)) u_cell (
        .a(a[k]), .b(b), .y(x[k]), .z(c[k]), .s(s[k]), .c(c[k+1])
      );
    end
    assign cout = c[N];

  end else if (STYLE == ST_CARRY4) begin : g_carry4
    localparam int unsigned NB = (N + 3) / 4;
    logic [4*NB-1:0] prop, gen, sum, co;
    logic [NB-1:0]   cb;  // carry into each block
    assign cb[0] = cin;
    for (genvar k = 0; k < 4 * NB; k++) begin : g_bit
      if (k < N) begin : g_used
        prim_lut4_l #(.INIT(prop_init4())) u_prop (
          .i({1'b0, x[k], b, a[k]}), .lo(prop[k])
        );
        assign gen[k] = x[k];
      end else begin : g_pad
        assign prop[k] = 1'b0;
        assign gen[k]  = 1'b0;
      end
    end
    for (genvar n = 0; n < NB; n++) begin : g_blk
      prim_carry4 u_c4 (
        .ci(cb[n]), .di(gen[4*n +: 4]), .s(prop[4*n +: 4]),
        .o(sum[4*n +: 4]), .co(co[4*n +: 4])
      );
      if (n + 1 < NB) begin : g_link
        assign cb[n+1] = co[4*n+3];
      end
    end
    assign s    = sum[N-1:0];
    assign cout = co[N-1];

  end else if (STYLE == ST_MULTAND) begin : g_multand
    logic [N:0] c;
    assign c[0] = cin;
    for (genvar k = 0; k < N; k++) begin : g_bit
      logic pp, prop;
      prim_mult_and u_and  (.i0(a[k]), .i1(b), .lo(pp));
      prim_lut4_l #(.INIT(prop_init4())) u_prop (
        .i({1'b0, x[k], b, a[k]}), .lo(prop)
      );
      prim_muxcy_l  u_mux  (.ci(c[k]), .di(pp), .s(prop), .lo(c[k+1]));
      prim_xorcy    u_xor  (.ci(c[k]), .li(prop), .o(s[k]));
    end
    assign cout = c[N];

  end else begin : g_dsp
    logic [35:0] y36;
    logic [47:0] p;
    always_comb begin
      y36 = '0;
      y36[N-1:0] = a & {N{b}};
    end
    // Combinational add path only: the output register is held in reset.
    prim_dsp48 u_dsp (
      .clk(1'b0), .rst(1'b1), .ce(1'b0),
      .op(DSP_ADD), .a(y36[35:18]), .b(y36[17:0]), .c({{(48-N){1'b0}}, x}),
      .cin(cin), .p(p), .p_q(), .pattern_detect()
    );
    assign s    = p[N-1:0];
    assign cout = p[N];
    // The slice adds at most 36-bit operands.
    initial assert (N <= 35) else $error("row_adder: DSP style needs N <= 35");
  end
endmodule
