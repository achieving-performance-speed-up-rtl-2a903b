// bw_mult: two's complement W x W Baugh-Wooley carry-save array multiplier.
//
// With A = -a_{W-1} 2^{W-1} + sum a_i 2^i and B alike, the product modulo 2^{2W}
// is the sum of all a_i*b_j with the W-1 terms of the sign row (j = W-1, i <
// W-1) and of the sign column (i = W-1, j < W-1) inverted, plus the constants
// 2^W and 2^{2W-1}. The array is that of csa_mult with those cells forming
// NAND instead of AND partial products; 2^W enters as the carry into the last
// cell of row 1 and 2^{2W-1} as the free top input of the vector merging adder
// (VMA), whose carry out is dropped. Fully combinational; p is the signed
// product. Cell and VMA styles as in csa_mult. The Baugh-Wooley method is the
// one named by the described design; this arrangement of the constants is
// this design's choice.
module bw_mult
  import mult_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter style_e      STYLE = ST_LUT6_2
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam bit CELL_LUT6 = (STYLE != ST_LUT4_L) && (STYLE != ST_MULTAND);

  // sm[j][i] has weight i+j, cy[j][i] weight i+j+1.
  logic [W-1:0] sm [W];
  logic [W-1:0] cy [W];

  // Row 0: a_i*b0, with the sign-column term a_{W-1}*b0 inverted.
  assign sm[0] = {~(a[W-1] & b[0]), a[W-2:0] & {(W-1){b[0]}}};
  // Constant 2^W: carry of weight W into the last cell of row 1.
  assign cy[0] = {1'b1, {(W-1){1'b0}}};
  assign p[0]  = sm[0][0];

  for (genvar j = 1; j < W; j++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_cell
      localparam bit INV = ((i == W - 1) != (j == W - 1));
      logic y_in;
      if (i < W - 1) begin : g_diag
        assign y_in = sm[j-1][i+1];
      end else begin : g_edge
        assign y_in = 1'b0;
      end
      pc_cell #(.USE_LUT6(CELL_LUT6), .INV(INV)) u_cell (
        .a(a[i]), .b(b[j]), .y(y_in), .z(cy[j-1][i]), .s(sm[j][i]), .c(cy[j][i])
      );
    end
    assign p[j] = sm[j][0];
  end

  // Vector merging adder with the constant 2^{2W-1} in its top x bit.
  logic vma_cout;
  row_adder #(.N(W), .STYLE(STYLE)) u_vma (
    .x({1'b1, sm[W-1][W-1:1]}), .a(cy[W-1]), .b(1'b1), .cin(1'b0),
    .s(p[2*W-1:W]), .cout(vma_cout)
  );
endmodule
