// tb_prim_lut4_l: checks every address of a 4-input LUT against its INIT bit,
// for two different INIT values.
`include "tb/tb_check.svh"
module tb_prim_lut4_l;
  int checks = 0, failures = 0;
  localparam logic [15:0] INIT_A = 16'hA5C3;
  localparam logic [15:0] INIT_B = 16'h6996;  // 4-input XOR
  logic [3:0] i;
  logic lo_a, lo_b;

  prim_lut4_l #(.INIT(INIT_A)) dut_a (.i(i), .lo(lo_a));
  prim_lut4_l #(.INIT(INIT_B)) dut_b (.i(i), .lo(lo_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      i = 4'(k);
      #1;
      `TB_CHECK(lo_a == ((INIT_A >> k) & 16'd1), $sformatf("A addr %0d", k))
      `TB_CHECK(lo_b == (i[0] ^ i[1] ^ i[2] ^ i[3]), $sformatf("B addr %0d", k))
    end
    `TB_FINISH
  end
endmodule
