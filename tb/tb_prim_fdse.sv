// tb_prim_fdse: drives random clock-enable, set and data for 400 cycles and
// compares the flip-flop with a reference model after every rising edge
// (set wins over enable, enable loads data, otherwise hold). Also checks the
// power-up value of a set-type (INIT=1) and a clear-type (INIT=0) instance.
`include "tb/tb_check.svh"
module tb_prim_fdse;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic ce = 1'b0, s = 1'b0, d = 1'b0;
  logic q1, q0;
  logic model;
  int n_set_over_ce = 0, n_hold = 0, n_load = 0;

  always #5 clk = ~clk;

  prim_fdse #(.INIT(1'b1)) dut1 (.c(clk), .ce(ce), .s(s), .d(d), .q(q1));
  prim_fdse #(.INIT(1'b0)) dut0 (.c(clk), .ce(ce), .s(s), .d(d), .q(q0));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    #1;
    `TB_CHECK(q1 == 1'b1, "INIT=1 power-up")
    `TB_CHECK(q0 == 1'b0, "INIT=0 power-up")
    // Bring both to the same known state.
    @(negedge clk); s = 1'b1;
    @(negedge clk); s = 1'b0;
    model = 1'b1;
    `TB_CHECK(q1 == 1'b1 && q0 == 1'b1, "set")
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      ce = 1'($urandom_range(0, 1));
      s  = ($urandom_range(0, 5) == 0);
      d  = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (s) begin
        model = 1'b1;
        if (ce && !d) n_set_over_ce++;
      end else if (ce) begin
        model = d; n_load++;
      end else begin
        n_hold++;
      end
      #1;
      `TB_CHECK(q1 == model && q0 == model, $sformatf("cycle %0d ce=%b s=%b d=%b q=%b/%b exp %b", k, ce, s, d, q1, q0, model))
    end
    `TB_CHECK(n_set_over_ce > 0 && n_hold > 0 && n_load > 0, "all cases seen")
    `TB_FINISH
  end
endmodule
