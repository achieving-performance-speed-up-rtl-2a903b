// tb_prim_carry4: exhaustive check of the 4-bit fast carry block over all
// carry-in, data and select combinations, against a bit-by-bit model, and a
// check that with select = a^b and data = a the block adds a + b + ci.
`include "tb/tb_check.svh"
module tb_prim_carry4;
  int checks = 0, failures = 0;
  logic       ci;
  logic [3:0] di, s, o, co;
  prim_carry4 dut (.ci(ci), .di(di), .s(s), .o(o), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic c;
    logic [3:0] eo, eco;
    for (int k = 0; k < 512; k++) begin
      {ci, di, s} = 9'(k);
      #1;
      c = ci;
      for (int n = 0; n < 4; n++) begin
        eo[n]  = s[n] ^ c;
        eco[n] = s[n] ? c : di[n];
        c      = eco[n];
      end
      `TB_CHECK(o == eo && co == eco, $sformatf("ci=%b di=%b s=%b o=%b co=%b", ci, di, s, o, co))
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int cc = 0; cc < 2; cc++) begin
          s = 4'(x ^ y); di = 4'(x); ci = cc[0];
          #1;
          `TB_CHECK({co[3], o} == 5'(x + y + cc), $sformatf("add %0d+%0d+%0d", x, y, cc))
        end
    `TB_FINISH
  end
endmodule
