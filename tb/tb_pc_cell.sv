// tb_pc_cell: exhaustive check of the processing cell in its four builds
// (two 4-input LUTs or one dual-output LUT, AND or NAND partial product):
// {c,s} must equal pp + y + z.
`include "tb/tb_check.svh"
module tb_pc_cell;
  int checks = 0, failures = 0;
  logic a, b, y, z;
  logic [3:0] s, c;

  pc_cell #(.USE_LUT6(1'b0), .INV(1'b0)) d0 (.a(a), .b(b), .y(y), .z(z), .s(s[0]), .c(c[0]));
  pc_cell #(.USE_LUT6(1'b1), .INV(1'b0)) d1 (.a(a), .b(b), .y(y), .z(z), .s(s[1]), .c(c[1]));
  pc_cell #(.USE_LUT6(1'b0), .INV(1'b1)) d2 (.a(a), .b(b), .y(y), .z(z), .s(s[2]), .c(c[2]));
  pc_cell #(.USE_LUT6(1'b1), .INV(1'b1)) d3 (.a(a), .b(b), .y(y), .z(z), .s(s[3]), .c(c[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    int pp, tot;
    for (int k = 0; k < 16; k++) begin
      {z, y, b, a} = 4'(k);
      #1;
      for (int v = 0; v < 4; v++) begin
        pp  = (a & b) ^ (v >= 2);
        tot = pp + y + z;
        `TB_CHECK({c[v], s[v]} == 2'(tot), $sformatf("variant %0d in %b%b%b%b got %b%b", v, z, y, b, a, c[v], s[v]))
      end
    end
    `TB_FINISH
  end
endmodule
