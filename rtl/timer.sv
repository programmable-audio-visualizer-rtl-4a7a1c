// timer: counts down a cycle count to hold a sequencer still.
// start loads value; each clock with en high counts one down. done is high
// whenever the count is zero and no start is being applied, so a start with
// value 0 is done at once and a start with value v is done v enabled clocks
// later. Used twice: the processor holds its pc on it during long
// instructions, and the effects pixel sequencer waits on it for each pixel
// (there en drops while a memory access is refused, freezing the count).
module timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] value,
  input  logic         en,
  output logic         done
);
  logic [W-1:0] count;
  always_ff @(posedge clk) begin
    if (rst)                      count <= '0;
    else if (start)               count <= value;
    else if (en && count != '0)   count <= count - 1'b1;
  end
  assign done = (count == '0) && !start;
endmodule
