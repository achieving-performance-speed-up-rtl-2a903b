// tb_mult_wordlengths: the three multipliers in all five styles at the other
// operand word lengths of the evaluation, 4, 8 and 32 bits (16 bits is the
// default, covered by tb_mult_suite). 4 and 8 bits are checked for every
// operand pair, 32 bits for extreme and 2000 random pairs, against unsigned
// (ripple-carry, carry-save) and two's complement (Baugh-Wooley) references.
`include "tb/tb_check.svh"
module tb_mult_wordlengths;
  import mult_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4;
  logic [7:0]  a8,  b8;
  logic [31:0] a32, b32;
  logic [7:0]  r4  [3][NSTYLE];
  logic [15:0] r8  [3][NSTYLE];
  logic [63:0] r32 [3][NSTYLE];

  for (genvar k = 0; k < NSTYLE; k++) begin : g_dut
    rca_mult #(.W(4),  .STYLE(style_e'(k))) u_rca4  (.a(a4),  .b(b4),  .p(r4[0][k]));
    csa_mult #(.W(4),  .STYLE(style_e'(k))) u_csa4  (.a(a4),  .b(b4),  .p(r4[1][k]));
    bw_mult  #(.W(4),  .STYLE(style_e'(k))) u_bw4   (.a(a4),  .b(b4),  .p(r4[2][k]));
    rca_mult #(.W(8),  .STYLE(style_e'(k))) u_rca8  (.a(a8),  .b(b8),  .p(r8[0][k]));
    csa_mult #(.W(8),  .STYLE(style_e'(k))) u_csa8  (.a(a8),  .b(b8),  .p(r8[1][k]));
    bw_mult  #(.W(8),  .STYLE(style_e'(k))) u_bw8   (.a(a8),  .b(b8),  .p(r8[2][k]));
    rca_mult #(.W(32), .STYLE(style_e'(k))) u_rca32 (.a(a32), .b(b32), .p(r32[0][k]));
    csa_mult #(.W(32), .STYLE(style_e'(k))) u_csa32 (.a(a32), .b(b32), .p(r32[1][k]));
    bw_mult  #(.W(32), .STYLE(style_e'(k))) u_bw32  (.a(a32), .b(b32), .p(r32[2][k]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [63:0] eu, es;
    a32 = '0; b32 = '0; a8 = '0; b8 = '0;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        eu = 64'(x * y);
        es = 64'($signed(a4) * $signed(b4));
        for (int k = 0; k < NSTYLE; k++) begin
          `TB_CHECK(r4[0][k] == eu[7:0], $sformatf("W=4 rca style %0d %0d*%0d", k, x, y))
          `TB_CHECK(r4[1][k] == eu[7:0], $sformatf("W=4 csa style %0d %0d*%0d", k, x, y))
          `TB_CHECK(r4[2][k] == es[7:0], $sformatf("W=4 bw style %0d %0d*%0d", k, x, y))
        end
      end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        eu = 64'(x * y);
        es = 64'($signed(a8) * $signed(b8));
        for (int k = 0; k < NSTYLE; k++) begin
          `TB_CHECK(r8[0][k] == eu[15:0], $sformatf("W=8 rca style %0d %0d*%0d", k, x, y))
          `TB_CHECK(r8[1][k] == eu[15:0], $sformatf("W=8 csa style %0d %0d*%0d", k, x, y))
          `TB_CHECK(r8[2][k] == es[15:0], $sformatf("W=8 bw style %0d %0d*%0d", k, x, y))
        end
      end
    for (int t = 0; t < 2016; t++) begin
      if (t < 16) begin
        a32 = (t % 4 == 0) ? 32'hFFFF_FFFF : (t % 4 == 1) ? 32'h8000_0000 : (t % 4 == 2) ? 32'h7FFF_FFFF : 32'd1;
        b32 = (t / 4 == 0) ? 32'hFFFF_FFFF : (t / 4 == 1) ? 32'h8000_0000 : (t / 4 == 2) ? 32'h7FFF_FFFF : 32'd1;
      end else begin
        a32 = $urandom(); b32 = $urandom();
      end
      #1;
      eu = 64'(a32) * 64'(b32);
      es = 64'($signed(a32)) * 64'($signed(b32));
      for (int k = 0; k < NSTYLE; k++) begin
        `TB_CHECK(r32[0][k] == eu, $sformatf("W=32 rca style %0d %h*%h got %h", k, a32, b32, r32[0][k]))
        `TB_CHECK(r32[1][k] == eu, $sformatf("W=32 csa style %0d %h*%h got %h", k, a32, b32, r32[1][k]))
        `TB_CHECK(r32[2][k] == es, $sformatf("W=32 bw style %0d %h*%h got %h exp %h", k, a32, b32, r32[2][k], es))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
