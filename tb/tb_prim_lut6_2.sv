// tb_prim_lut6_2: checks both outputs of the dual-output LUT at all 64
// addresses: O6 reads the full table, O5 the lower half whatever I5 is.
`include "tb/tb_check.svh"
module tb_prim_lut6_2;
  int checks = 0, failures = 0;
  localparam logic [63:0] INIT = 64'hF0E1_D2C3_B4A5_9687;
  logic [5:0] i;
  logic o6, o5;

  prim_lut6_2 #(.INIT(INIT)) dut (.i(i), .o6(o6), .o5(o5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      i = 6'(k);
      #1;
      `TB_CHECK(o6 == ((INIT >> k) & 64'd1), $sformatf("o6 addr %0d", k))
      `TB_CHECK(o5 == ((INIT >> (k % 32)) & 64'd1), $sformatf("o5 addr %0d", k))
    end
    `TB_FINISH
  end
endmodule
