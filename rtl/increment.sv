// increment: next-address logic of the frame processor, and owner of flip.
// next_pc = pc + inc_val, so inc_val = 1 steps on and inc_val = n + 1 skips n
// instructions. When inc_reset is high (the program reached its empty
// instruction) next_pc is the first instruction instead, and on the clock
// where the pc takes it (advance high) flip toggles, swapping the front and
// back frame buffers in the memory manager. flip is 0 after reset.
// Follows the document's description; the widths are this design's.
// inc_val is a full 16-bit word; only its low AW bits can change the pc.
module increment #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] pc,
  input  logic [15:0]   inc_val,
  input  logic          inc_reset,
  input  logic          advance,
  output logic [AW-1:0] next_pc,
  output logic          flip
);
  assign next_pc = inc_reset ? '0 : pc + AW'(inc_val);

  always_ff @(posedge clk) begin
    if (rst)                         flip <= 1'b0;
    else if (advance && inc_reset)   flip <= ~flip;
  end
endmodule
