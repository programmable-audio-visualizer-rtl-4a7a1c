// effects_time_logic: clock budget of one pixel of the effects engine.
// For a convolution the pixel needs one clock per tap to read (nonzero
// coefficient and neighbour inside the buffer, counted at the translated
// coordinates) plus the two-clock read latency of the memory manager; for the
// generators it needs three clocks (memory-pixel read, its latency, and one
// clock for the generator read ports). The count is in clocks in which the
// engine's memory requests are granted: the effects timer freezes on a
// refused request. It also outputs the tap mask the count comes from.
// The document gives the inputs (register parameters and the current
// coordinates) and the output; the counting rule matches this design's
// pipeline.
module effects_time_logic
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512,
  parameter int unsigned RD_LAT   = 2
) (
  input  logic                   conv_mode,
  input  logic [8:0][WORD_W-1:0] conv_k,
  input  coord_t                 x,
  input  coord_t                 y,
  output logic [8:0]             tap_mask,
  output logic [31:0]            value
);
  always_comb begin
    tap_mask = conv_tap_mask(conv_k, x, y, int'(GLOBAL_W), int'(GLOBAL_H));
    if (conv_mode) value = 32'($countones(tap_mask)) + 32'(RD_LAT);
    else           value = 32'(RD_LAT + 1);
  end
endmodule
