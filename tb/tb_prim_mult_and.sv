// tb_prim_mult_and: exhaustive check of the multiplier AND gate.
`include "tb/tb_check.svh"
module tb_prim_mult_and;
  int checks = 0, failures = 0;
  logic i0, i1, lo;
  prim_mult_and dut (.i0(i0), .i1(i1), .lo(lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {i1, i0} = 2'(k);
      #1;
      `TB_CHECK(lo == (k == 3), $sformatf("in %0d", k))
    end
    `TB_FINISH
  end
endmodule
