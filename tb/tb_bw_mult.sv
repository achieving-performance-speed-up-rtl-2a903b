// tb_bw_mult: the bw multiplier in all five styles, checked against two's complement
// reference products: at the default W=16 for extreme and 3000 random
// operand pairs, and at W=5 for every operand pair.
`include "tb/tb_check.svh"
module tb_bw_mult;
  import mult_pkg::*;
  int checks = 0, failures = 0;
  localparam int unsigned WL = 16;
  localparam int unsigned WS = 5;
  localparam bit SIGNED = 1'b1;

  logic [WL-1:0]   al, bl;
  logic [WS-1:0]   as, bs;
  logic [2*WL-1:0] pl [NSTYLE];
  logic [2*WS-1:0] ps [NSTYLE];

  for (genvar k = 0; k < NSTYLE; k++) begin : g_dut
    bw_mult #(.STYLE(style_e'(k)))          u_l (.a(al), .b(bl), .p(pl[k]));
    bw_mult #(.W(WS), .STYLE(style_e'(k))) u_s (.a(as), .b(bs), .p(ps[k]));
  end

  function automatic logic [63:0] ref_mul(logic [31:0] x, logic [31:0] y, int unsigned w);
    longint sx, sy;
    if (SIGNED) begin
      sx = longint'(x) - ((x >> (w - 1)) & 1 ? (longint'(1) << w) : 0);
      sy = longint'(y) - ((y >> (w - 1)) & 1 ? (longint'(1) << w) : 0);
    end else begin
      sx = longint'(x);
      sy = longint'(y);
    end
    return 64'(sx * sy) & ((64'd1 << (2 * w)) - 1);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hAAAA};
    for (int t = 0; t < 36 + 3000; t++) begin
      if (t < 36) begin
        al = corner[t / 6]; bl = corner[t % 6];
      end else begin
        al = 16'($urandom()); bl = 16'($urandom());
      end
      #1;
      for (int k = 0; k < NSTYLE; k++)
        `TB_CHECK(64'(pl[k]) == ref_mul(32'(al), 32'(bl), WL),
                  $sformatf("W=16 style %0d %h*%h got %h exp %h", k, al, bl, pl[k], ref_mul(32'(al), 32'(bl), WL)))
    end
    for (int x = 0; x < (1 << WS); x++)
      for (int y = 0; y < (1 << WS); y++) begin
        as = WS'(x); bs = WS'(y);
        #1;
        for (int k = 0; k < NSTYLE; k++)
          `TB_CHECK(64'(ps[k]) == ref_mul(32'(x), 32'(y), WS),
                    $sformatf("W=5 style %0d %0d*%0d got %h", k, x, y, ps[k]))
      end
    `TB_FINISH
  end
endmodule
