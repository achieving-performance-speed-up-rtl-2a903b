// tb_row_adder: the carry-propagate adder in all five styles, at the 16-bit
// default and at 7 bits (not a multiple of the 4-bit carry block), checked
// against x + (a&b) + cin for random and corner operands. The corners include
// a carry rippling through every bit.
`include "tb/tb_check.svh"
module tb_row_adder;
  import mult_pkg::*;
  int checks = 0, failures = 0;
  localparam int unsigned NA = 16;
  localparam int unsigned NB = 7;

  logic [NA-1:0] xa, aa;
  logic [NB-1:0] xb, ab;
  logic b, cin;
  logic [NA-1:0] sa [NSTYLE];
  logic [NB-1:0] sb [NSTYLE];
  logic [NSTYLE-1:0] ca, cb;

  for (genvar k = 0; k < NSTYLE; k++) begin : g_dut
    row_adder #(.N(NA), .STYLE(style_e'(k))) u_a (.x(xa), .a(aa), .b(b), .cin(cin), .s(sa[k]), .cout(ca[k]));
    row_adder #(.N(NB), .STYLE(style_e'(k))) u_b (.x(xb), .a(ab), .b(b), .cin(cin), .s(sb[k]), .cout(cb[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    logic [NA:0] ea;
    logic [NB:0] eb;
    for (int t = 0; t < 2000; t++) begin
      xa = 16'($urandom()); aa = 16'($urandom());
      xb = 7'($urandom());  ab = 7'($urandom());
      b = 1'($urandom_range(0, 1)); cin = 1'($urandom_range(0, 1));
      if (t < 4) begin  // full-length carry ripple
        xa = '1; aa = (t[0]) ? 16'd1 : '0; xb = '1; ab = (t[0]) ? 7'd1 : '0;
        b = 1'b1; cin = t[1];
      end
      #1;
      ea = {1'b0, xa} + {1'b0, aa & {NA{b}}} + (NA+1)'(cin);
      eb = {1'b0, xb} + {1'b0, ab & {NB{b}}} + (NB+1)'(cin);
      for (int k = 0; k < NSTYLE; k++) begin
        `TB_CHECK({ca[k], sa[k]} == ea, $sformatf("N=16 style %0d x=%h a=%h b=%b cin=%b got %h exp %h", k, xa, aa, b, cin, {ca[k], sa[k]}, ea))
        `TB_CHECK({cb[k], sb[k]} == eb, $sformatf("N=7 style %0d x=%h a=%h b=%b cin=%b got %h exp %h", k, xb, ab, b, cin, {cb[k], sb[k]}, eb))
      end
    end
    `TB_FINISH
  end
endmodule
