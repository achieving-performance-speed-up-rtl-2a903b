// tb_prim_muxcy_l: exhaustive check of the carry multiplexer
// (select high passes the carry in, low passes the data input).
`include "tb/tb_check.svh"
module tb_prim_muxcy_l;
  int checks = 0, failures = 0;
  logic ci, di, s, lo;
  prim_muxcy_l dut (.ci(ci), .di(di), .s(s), .lo(lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {s, di, ci} = 3'(k);
      #1;
      `TB_CHECK(lo == (k[2] ? k[0] : k[1]), $sformatf("in %0d", k))
    end
    `TB_FINISH
  end
endmodule
