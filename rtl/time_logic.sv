// time_logic: cycle budget of the current processor instruction.
// Arithmetic, skip and end instructions take no extra clocks (value 0).
// convolve and generate sweep every pixel of the virtual buffer, so their
// value is PIXELS times the fewest clocks the effects engine can spend on a
// pixel in that mode (CONV_MIN, GEN_MIN): the processor's timer runs at least
// that long, and the control logic then also waits for the effects engine to
// report idle, since refused memory accesses can stretch the sweep. The
// document says only that this block tells how many clocks an instruction
// takes; the lower-bound rule is this design's.
// Only the opcode field of the instruction matters here; the rest is unused.
module time_logic
  import viz_pkg::*;
#(
  parameter int unsigned PIXELS   = 1280 * 512,
  parameter int unsigned CONV_MIN = 5,
  parameter int unsigned GEN_MIN  = 6
) (
  input  instr_t      instr,
  output logic [31:0] value
);
  always_comb begin
    unique case (instr.op)
      OP_CONV: value = 32'(PIXELS * CONV_MIN);
      OP_GEN:  value = 32'(PIXELS * GEN_MIN);
      default: value = 32'd0;
    endcase
  end
endmodule
