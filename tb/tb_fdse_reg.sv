// tb_fdse_reg: checks the 32-bit capture register for load on clock enable,
// hold without it, and synchronous set to all ones overriding the enable,
// with random data for 300 cycles against a reference model.
`include "tb/tb_check.svh"
module tb_fdse_reg;
  int checks = 0, failures = 0;
  localparam int unsigned N = 32;
  logic clk = 1'b0;
  logic ce = 1'b0, set = 1'b0;
  logic [N-1:0] d = '0, q, model;
  int n_set = 0, n_hold = 0, n_load = 0;

  always #5 clk = ~clk;

  fdse_reg #(.N(N)) dut (.clk(clk), .ce(ce), .set(set), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    #1;
    `TB_CHECK(q == '0, "power-up value")
    model = '0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ce  = 1'($urandom_range(0, 1));
      set = ($urandom_range(0, 7) == 0);
      d   = $urandom();
      @(posedge clk);
      if (set)     begin model = '1; n_set++;  end
      else if (ce) begin model = d;  n_load++; end
      else         n_hold++;
      #1;
      `TB_CHECK(q == model, $sformatf("cycle %0d q=%h exp %h", k, q, model))
    end
    `TB_CHECK(n_set > 0 && n_hold > 0 && n_load > 0, "all cases seen")
    `TB_FINISH
  end
endmodule
