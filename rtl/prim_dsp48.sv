// prim_dsp48: arithmetic slice, a reduced model of a DSP block.
//
// The A and B inputs are concatenated into one 36-bit operand A:B (zero-
// extended to 48 bits) for adding and logic, and used as two signed 18-bit
// operands for multiplication. The combinational result p is
//   DSP_ADD: C + A:B + cin          DSP_AND: C & A:B
//   DSP_SUB: C - (A:B + cin)        DSP_OR:  C | A:B
//   DSP_MUL: A * B (signed)         DSP_XOR: C ^ A:B
//   DSP_ACC: p_q + A:B + cin (accumulate onto the output register)
// modulo 2^48. The output register p_q loads p on a rising edge with ce=1 and
// clears on a rising edge with rst=1 (rst wins), so DSP_ACC with ce held high
// accumulates one term per cycle. pattern_detect is high when p matches
// PATTERN in every bit where MASK is 0.
// The multiplier suite uses only the combinational add path (a whole array row
// or vector merging adder in one slice) and ties the clocked inputs low.
// The set of operations follows the DSP48 description; the operand packing,
// the single output register, the 48-bit width and the pattern-detect form
// are this design's choices. Shifting, cascade ports and the input pipeline
// registers of the vendor slice are not built.
module prim_dsp48
  import mult_pkg::*;
#(
  parameter logic [47:0] PATTERN = 48'h0,
  parameter logic [47:0] MASK    = 48'h0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  dsp_op_e      op,
  input  logic [17:0]  a,
  input  logic [17:0]  b,
  input  logic [47:0]  c,
  input  logic         cin,
  output logic [47:0]  p,
  output logic [47:0]  p_q,
  output logic         pattern_detect
);
  logic [47:0] ab;
  logic signed [35:0] prod;

  always_comb begin
    ab   = {12'd0, a, b};
    prod = $signed(a) * $signed(b);
    unique case (op)
      DSP_ADD: p = c + ab + {47'd0, cin};
      DSP_SUB: p = c - (ab + {47'd0, cin});
      DSP_MUL: p = {{12{prod[35]}}, prod};
      DSP_ACC: p = p_q + ab + {47'd0, cin};
      DSP_AND: p = c & ab;
      DSP_OR:  p = c | ab;
      DSP_XOR: p = c ^ ab;
      default: p = c;
    endcase
    pattern_detect = ((p ^ PATTERN) & ~MASK) == 48'd0;
  end

  always_ff @(posedge clk) begin
    if (rst)     p_q <= '0;
    else if (ce) p_q <= p;
  end
endmodule
