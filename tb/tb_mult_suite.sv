// tb_mult_suite: end-to-end test of the multiplier suite at its default size
// (W=16, no parameter overrides). A new operand pair is applied every cycle;
// one rising edge later all fifteen registered products (three structures x
// five styles) must equal the reference products, unsigned for the ripple-
// carry and carry-save arrays and two's complement for Baugh-Wooley. Cycles
// with the clock enable low must hold the previous products, and cycles with
// set high must load all ones even with the enable low. The test counts how
// often each of these happened (and how often a Baugh-Wooley product was
// negative) and fails if one never did. Right after new operands are applied
// the outputs must still show the previous products, so the latency is
// exactly one clock edge.
`include "tb/tb_check.svh"
module tb_mult_suite;
  import mult_pkg::*;
  int checks = 0, failures = 0;
  localparam int unsigned W = 16;
  localparam int unsigned NOPS = 4000;

  logic clk = 1'b0;
  logic ce = 1'b0, set = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p_rca [NSTYLE];
  logic [2*W-1:0] p_csa [NSTYLE];
  logic [2*W-1:0] p_bw  [NSTYLE];

  always #5 clk = ~clk;

  mult_suite dut (.clk(clk), .ce(ce), .set(set), .a(a), .b(b),
                  .p_rca(p_rca), .p_csa(p_csa), .p_bw(p_bw));

  int n_load = 0, n_hold = 0, n_set = 0, n_neg = 0, n_set_over_ce = 0;

  initial begin
    repeat (NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [2*W-1:0] eu, es;
    logic ce_s, set_s;
    eu = '0; es = '0;
    // Start from a known register state.
    @(negedge clk); set = 1'b1;
    @(negedge clk); set = 1'b0;
    eu = '1; es = '1;
    for (int t = 0; t < NOPS; t++) begin
      // Operands and controls change on the falling edge.
      @(negedge clk);
      a   = 16'($urandom());
      b   = 16'($urandom());
      if (t % 97 == 0) begin a = 16'h8000; b = 16'h8000; end
      if (t % 89 == 0) begin a = 16'hFFFF; b = 16'hFFFF; end
      ce  = ($urandom_range(0, 9) != 0);
      set = ($urandom_range(0, 49) == 0);
      ce_s = ce; set_s = set;
      // Registered outputs: nothing may change before the clock edge.
      #1;
      for (int s = 0; s < NSTYLE; s++)
        `TB_CHECK(p_rca[s] == eu && p_csa[s] == eu && p_bw[s] == es,
                  $sformatf("op %0d style %0d output changed before the clock edge", t, s))
      @(posedge clk);
      if (set_s) begin
        eu = '1; es = '1; n_set++;
        if (!ce_s) n_set_over_ce++;
      end else if (ce_s) begin
        eu = 32'(a) * 32'(b);
        es = 32'($signed(a) * $signed(b));
        n_load++;
        if (es[2*W-1]) n_neg++;
      end else begin
        n_hold++;
      end
      #1;
      for (int s = 0; s < NSTYLE; s++) begin
        `TB_CHECK(p_rca[s] == eu, $sformatf("op %0d rca style %0d %h*%h got %h exp %h", t, s, a, b, p_rca[s], eu))
        `TB_CHECK(p_csa[s] == eu, $sformatf("op %0d csa style %0d %h*%h got %h exp %h", t, s, a, b, p_csa[s], eu))
        `TB_CHECK(p_bw[s]  == es, $sformatf("op %0d bw style %0d %h*%h got %h exp %h", t, s, a, b, p_bw[s], es))
      end
    end
    $display("loads=%0d holds=%0d sets=%0d set_over_ce=%0d negative_bw=%0d",
             n_load, n_hold, n_set, n_set_over_ce, n_neg);
    `TB_CHECK(n_load > 0, "no product was loaded")
    `TB_CHECK(n_hold > 0, "clock enable never held the products")
    `TB_CHECK(n_set > 0, "set never happened")
    `TB_CHECK(n_set_over_ce > 0, "set never overrode a low clock enable")
    `TB_CHECK(n_neg > 0, "no negative Baugh-Wooley product")
    `TB_FINISH
  end
endmodule
