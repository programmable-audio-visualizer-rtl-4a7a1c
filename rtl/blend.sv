// blend: merges the generators' output with the pixel already in the buffer.
// Starting from the memory pixel, each lit generator in turn (generator 0
// first) is combined with the colour so far according to the mode:
//   REPLACE  the generator colour replaces it (later generators on top);
//   ADD      channel-wise saturating sum;
//   AVERAGE  channel-wise mean, rounded down;
//   MAX      channel-wise maximum.
// Combinational. The document says only that blend combines the generator
// colours with the current memory pixel under parameter control; the modes
// are this design's.
module blend
  import viz_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  blend_e          mode,
  input  color_t          mem,
  input  logic   [N-1:0]  lit,
  input  color_t [N-1:0]  gen,
  output color_t          color
);
  always_comb begin
    color = mem;
    for (int i = 0; i < int'(N); i++) begin
      if (lit[i]) begin
        unique case (mode)
          BLEND_REPLACE: color = gen[i];
          BLEND_ADD:     color = sat_add(color, gen[i]);
          BLEND_AVERAGE: color = '{r: 4'((5'(color.r) + 5'(gen[i].r)) >> 1),
                                   g: 4'((5'(color.g) + 5'(gen[i].g)) >> 1),
                                   b: 4'((5'(color.b) + 5'(gen[i].b)) >> 1)};
          default:       color = '{r: (color.r > gen[i].r) ? color.r : gen[i].r,
                                   g: (color.g > gen[i].g) ? color.g : gen[i].g,
                                   b: (color.b > gen[i].b) ? color.b : gen[i].b};
        endcase
      end
    end
  end
endmodule
