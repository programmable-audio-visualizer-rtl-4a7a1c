// translate: applies the motion effects to the pixel coordinates.
// Adds the sum of the N motion units' vectors to (x, y), giving the source
// coordinates (xt, yt) that the generators and the convolution work on.
// Combinational; follows the document's description.
module translate
  import viz_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  coord_t         x,
  input  coord_t         y,
  input  coord_t [N-1:0] vx,
  input  coord_t [N-1:0] vy,
  output coord_t         xt,
  output coord_t         yt
);
  always_comb begin
    xt = x;
    yt = y;
    for (int i = 0; i < int'(N); i++) begin
      xt = xt + vx[i];
      yt = yt + vy[i];
    end
  end
endmodule
