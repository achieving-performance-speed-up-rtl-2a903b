// csa_mult: unsigned W x W bit-parallel carry-save array multiplier.
//
// Row 0 holds the partial products a_i*b0 with all carries zero. Each later row
// j is W processing cells (pc_cell); cell i adds a_i*bj to the sum of cell i+1
// of the row above (same weight) and to the carry of cell i of the row above,
// so carries move down, never sideways, and no row has a ripple path. Sum bit 0
// of row j is product bit j. The last row leaves a sum vector and a carry
// vector of weight W and up, which the vector merging adder (VMA, a W-bit
// row_adder) adds to give product bits W..2W-1. Fully combinational.
// STYLE: LUT4_L builds the cells from two 4-input LUTs, the other styles from
// one dual-output LUT except MULT_AND (its family has no dual-output LUT),
// which uses 4-input LUTs. The fast-carry and DSP styles change only the VMA,
// the one ripple path of the structure. Unsigned operands are this design's
// choice; the two's complement array is bw_mult.
module csa_mult
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

  assign sm[0] = a & {W{b[0]}};
  assign cy[0] = '0;
  assign p[0]  = sm[0][0];

  for (genvar j = 1; j < W; j++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_cell
      logic y_in;
      if (i < W - 1) begin : g_diag
        assign y_in = sm[j-1][i+1];
      end else begin : g_edge
        assign y_in = 1'b0;
      end
      pc_cell #(.USE_LUT6(CELL_LUT6), .INV(1'b0)) u_cell (
        .a(a[i]), .b(b[j]), .y(y_in), .z(cy[j-1][i]), .s(sm[j][i]), .c(cy[j][i])
      );
    end
    assign p[j] = sm[j][0];
  end

  // Vector merging adder: weights W .. 2W-1.
  logic vma_cout;
  row_adder #(.N(W), .STYLE(STYLE)) u_vma (
    .x({1'b0, sm[W-1][W-1:1]}), .a(cy[W-1]), .b(1'b1), .cin(1'b0),
    .s(p[2*W-1:W]), .cout(vma_cout)
  );
  // The product of two W-bit numbers fits 2W bits, so the VMA never overflows.
  always_comb assert (vma_cout == 1'b0) else $error("csa_mult: VMA carry out");
endmodule
