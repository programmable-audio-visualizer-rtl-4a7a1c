// alu: 16-bit arithmetic unit of the processor, combinational.
// ADD, SUB, MUL (low 16 bits of the signed product), AND, OR, XOR,
// SLT (1 if A < B, signed, else 0) and SHR (A shifted right, arithmetic, by
// B[3:0]). The document asks for "the usual arithmetic functions" and the
// comparison used in its example program; this set is this design's.
// The upper half of the 32-bit product is deliberately unused.
module alu
  import viz_pkg::*;
(
  input  alufn_e fn,
  input  word_t  a,
  input  word_t  b,
  output word_t  y
);
  logic signed [31:0] prod;
  assign prod = a * b;
  always_comb begin
    unique case (fn)
      FN_ADD: y = a + b;
      FN_SUB: y = a - b;
      FN_MUL: y = prod[15:0];
      FN_AND: y = a & b;
      FN_OR:  y = a | b;
      FN_XOR: y = a ^ b;
      FN_SLT: y = (a < b) ? 16'sd1 : 16'sd0;
      FN_SHR: y = a >>> b[3:0];
      default: y = '0;
    endcase
  end
endmodule
