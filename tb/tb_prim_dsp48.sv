// tb_prim_dsp48: the arithmetic slice against 64-bit reference arithmetic
// reduced to 48 bits. Random operands for every combinational operation (add,
// subtract, signed multiply, and, or, xor) with wrap-around corners; a run of
// accumulate cycles with random clock enable and a reset in the middle,
// compared with a running reference sum; and the pattern detector of a slice
// built with a pattern and mask, tried on matching and non-matching results.
`include "tb/tb_check.svh"
module tb_prim_dsp48;
  import mult_pkg::*;
  int checks = 0, failures = 0;
  localparam logic [47:0] PAT = 48'h0000_0000_1234;
  localparam logic [47:0] MSK = 48'hFFFF_FFFF_0000;  // compare the low 16 bits

  logic clk = 1'b0;
  logic rst = 1'b1, ce = 1'b0;
  dsp_op_e op = DSP_ADD;
  logic [17:0] a = '0, b = '0;
  logic [47:0] c = '0, p, p_q;
  logic cin = 1'b0, pd;
  logic [47:0] p2, p2_q;
  logic pd2;

  always #5 clk = ~clk;

  prim_dsp48 dut (.clk(clk), .rst(rst), .ce(ce), .op(op), .a(a), .b(b), .c(c),
                  .cin(cin), .p(p), .p_q(p_q), .pattern_detect(pd));
  prim_dsp48 #(.PATTERN(PAT), .MASK(MSK)) dut_pd (
    .clk(clk), .rst(1'b1), .ce(1'b0), .op(op), .a(a), .b(b), .c(c),
    .cin(cin), .p(p2), .p_q(p2_q), .pattern_detect(pd2));

  function automatic logic [47:0] model(dsp_op_e o, logic [17:0] aa, logic [17:0] bb,
                                        logic [47:0] cc, logic ci);
    longint unsigned ab, r;
    longint sa, sb;
    ab = {aa, bb};
    case (o)
      DSP_ADD: r = longint'(cc) + ab + longint'(ci);
      DSP_SUB: r = longint'(cc) - ab - longint'(ci);
      DSP_MUL: begin
        sa = longint'($signed(aa));
        sb = longint'($signed(bb));
        r  = longint'(sa * sb);
      end
      DSP_AND: r = longint'(cc) & ab;
      DSP_OR:  r = longint'(cc) | ab;
      DSP_XOR: r = longint'(cc) ^ ab;
      default: r = cc;
    endcase
    return r[47:0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    dsp_op_e ops [6] = '{DSP_ADD, DSP_SUB, DSP_MUL, DSP_AND, DSP_OR, DSP_XOR};
    longint unsigned acc;
    int n_acc = 0, n_acc_hold = 0, n_pd_hit = 0, n_pd_miss = 0;
    // Combinational operations.
    for (int k = 0; k < 3000; k++) begin
      op  = ops[$urandom_range(0, 5)];
      a   = 18'($urandom());
      b   = 18'($urandom());
      c   = {16'($urandom()), 32'($urandom())};
      cin = 1'($urandom_range(0, 1));
      if (k < 12) begin  // corners: extremes of every operand
        a = (k % 3 == 0) ? '1 : (k % 3 == 1) ? 18'h20000 : '0;
        b = (k % 2 == 0) ? '1 : 18'h20000;
        c = (k % 4 < 2) ? '1 : '0;
        op = ops[k % 3];
      end
      if (k % 10 == 0) begin  // force a pattern match on the low 16 bits
        op = DSP_XOR; c = {32'($urandom()), 16'h1234} ^ {12'd0, a, b};
        c[15:0] = 16'h1234 ^ b[15:0];
      end
      #1;
      `TB_CHECK(p == model(op, a, b, c, cin),
                $sformatf("op=%s a=%h b=%h c=%h cin=%b p=%h exp %h", op.name(), a, b, c, cin, p, model(op, a, b, c, cin)))
      `TB_CHECK(p2 == p, "second slice result")
      `TB_CHECK(pd2 == (p[15:0] == 16'h1234), $sformatf("pattern detect p=%h pd=%b", p, pd2))
      `TB_CHECK(pd == (p == 48'd0), "all-bits pattern detect")
      if (pd2) n_pd_hit++; else n_pd_miss++;
    end
    // Accumulation: reset, then random terms with random clock enable.
    @(negedge clk); rst = 1'b1; ce = 1'b1; op = DSP_ACC;
    @(negedge clk); rst = 1'b0; ce = 1'b0;
    `TB_CHECK(p_q == '0, "accumulator reset")
    acc = 0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      op  = DSP_ACC;
      a   = 18'($urandom()); b = 18'($urandom()); cin = 1'($urandom_range(0, 1));
      ce  = ($urandom_range(0, 3) != 0);
      rst = (k == 250);
      #1;
      `TB_CHECK(p == 48'(acc + {a, b} + cin), $sformatf("acc comb %0d", k))
      @(posedge clk);
      if (rst)     acc = 0;
      else if (ce) begin acc = 48'(acc + {a, b} + cin); n_acc++; end
      else         n_acc_hold++;
      #1;
      `TB_CHECK(p_q == 48'(acc), $sformatf("acc reg %0d p_q=%h exp %h", k, p_q, 48'(acc)))
    end
    `TB_CHECK(n_acc > 0 && n_acc_hold > 0 && n_pd_hit > 0 && n_pd_miss > 0, "all cases seen")
    `TB_FINISH
  end
endmodule
