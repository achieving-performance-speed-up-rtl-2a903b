// tb_prim_xorcy: exhaustive check of the carry-chain XOR.
`include "tb/tb_check.svh"
module tb_prim_xorcy;
  int checks = 0, failures = 0;
  logic ci, li, o;
  prim_xorcy dut (.ci(ci), .li(li), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {li, ci} = 2'(k);
      #1;
      `TB_CHECK(o == (k == 1 || k == 2), $sformatf("in %0d", k))
    end
    `TB_FINISH
  end
endmodule
