// mult_pkg: shared types and helper functions of the bit-parallel multiplier suite.
//
// style_e names the five ways each multiplier can be built from FPGA-style
// primitives: two look-up-table cell forms (LUT4_L pairs, one LUT6_2 per cell),
// two fast-carry forms (CARRY4, and the older MULT_AND/MUXCY_L/XORCY chain) and
// the DSP-slice form. dsp_op_e selects the operation of the arithmetic slice.
// The INIT helpers turn the processing-cell equations into look-up table
// contents, so that no table is typed in by hand.
package mult_pkg;

  typedef enum logic [2:0] {
    ST_LUT4_L  = 3'd0,  // two 4-input LUTs per cell: one for sum, one for carry
    ST_LUT6_2  = 3'd1,  // one dual-output LUT per cell: sum and carry
    ST_CARRY4  = 3'd2,  // LUT propagate + 4-bit fast carry block
    ST_MULTAND = 3'd3,  // MULT_AND generate + MUXCY_L carry + XORCY sum
    ST_DSP48   = 3'd4   // arithmetic slice adds the whole row
  } style_e;

  localparam int unsigned NSTYLE = 5;

  typedef enum logic [2:0] {
    DSP_ADD = 3'd0,  // P = C + A:B + CIN
    DSP_SUB = 3'd1,  // P = C - (A:B + CIN)
    DSP_MUL = 3'd2,  // P = A * B (signed 18x18)
    DSP_ACC = 3'd3,  // P = P_reg + A:B + CIN (accumulate)
    DSP_AND = 3'd4,  // P = C & A:B
    DSP_OR  = 3'd5,  // P = C | A:B
    DSP_XOR = 3'd6   // P = C ^ A:B
  } dsp_op_e;

  // Partial product of a processing cell: a&b, inverted for the Baugh-Wooley
  // sign row and sign column.
  function automatic logic cell_pp(input logic a, input logic b, input logic inv);
    return (a & b) ^ inv;
  endfunction

  // 16-bit INIT of the sum LUT of a cell, address {z,y,b,a}.
  function automatic logic [15:0] cell_sum_init4(input logic inv);
    logic [15:0] t;
    for (int k = 0; k < 16; k++)
      t[k] = cell_pp(k[0], k[1], inv) ^ k[2] ^ k[3];
    return t;
  endfunction

  // 16-bit INIT of the carry LUT of a cell, address {z,y,b,a}.
  function automatic logic [15:0] cell_carry_init4(input logic inv);
    logic [15:0] t;
    logic p;
    for (int k = 0; k < 16; k++) begin
      p = cell_pp(k[0], k[1], inv);
      t[k] = (p & k[2]) | (p & k[3]) | (k[2] & k[3]);
    end
    return t;
  endfunction

  // 64-bit INIT of a LUT6_2 cell, address {I5,I4,z,y,b,a} with I5 tied high and
  // I4 unused: the upper half (O6) holds the sum, the lower half (O5) the carry.
  function automatic logic [63:0] cell_init6(input logic inv);
    logic [63:0] t;
    logic [15:0] s, c;
    s = cell_sum_init4(inv);
    c = cell_carry_init4(inv);
    for (int k = 0; k < 32; k++) begin
      t[k]      = c[k[3:0]];
      t[k + 32] = s[k[3:0]];
    end
    return t;
  endfunction

  // 16-bit INIT of the propagate LUT of a fast-carry adder bit: (a&b)^x,
  // address {0,x,b,a}.
  function automatic logic [15:0] prop_init4();
    logic [15:0] t;
    for (int k = 0; k < 16; k++)
      t[k] = (k[0] & k[1]) ^ k[2];
    return t;
  endfunction

endpackage
