// asel: operand A multiplexer of the processor.
// Lets an instruction take an external value in place of register A:
// the register value, the beat detector's beat value, the push buttons
// (zero-extended), or zero (which turns "A op imm" into a load of a
// constant). The document names beat and buttons as inputs; the zero input
// and the 2-bit select are this design's.
module asel
  import viz_pkg::*;
#(
  parameter int unsigned NBUTTONS = 8
) (
  input  asel_e               sel,
  input  word_t               reg_a,
  input  word_t               beat,
  input  logic [NBUTTONS-1:0] buttons,
  output word_t               a
);
  always_comb begin
    unique case (sel)
      ASEL_REG:     a = reg_a;
      ASEL_BEAT:    a = beat;
      ASEL_BUTTONS: a = word_t'({{(WORD_W-NBUTTONS){1'b0}}, buttons});
      default:      a = '0;
    endcase
  end
endmodule
