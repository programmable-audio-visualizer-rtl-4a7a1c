// conv_fsm: walks the 3x3 neighbourhood of the current pixel.
// On start it loads the set of taps to read (tap_mask: nonzero coefficient
// and neighbour inside the buffer, see viz_pkg::conv_tap_mask) and then
// requests, one tap per granted clock, the old pixel at (x + dx, y + dy) from
// the memory manager's effects read port, lowest tap first; a refused request
// (rd_ready low) is held until granted. Every granted request is reported to
// mult_add (issue, tap), which receives the pixel itself. The final sums come
// back from mult_add; conv_fsm scales each channel by 2^-shift, clamps it to
// 0..15 and hands the colour to the pixel sequencer. busy is high while taps
// remain. Follows the document's description; the tap order and the
// normalisation by a shift are this design's.
module conv_fsm
  import viz_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [8:0]         tap_mask,
  input  coord_t             x,
  input  coord_t             y,
  output logic               rd_req,
  output coord_t             rd_x,
  output coord_t             rd_y,
  input  logic               rd_ready,
  output logic               issue,
  output logic [3:0]         tap,
  output logic               busy,
  input  logic signed [23:0] sum_r,
  input  logic signed [23:0] sum_g,
  input  logic signed [23:0] sum_b,
  input  logic [3:0]         shift,
  output color_t             color
);
  logic [8:0] pending;

  always_comb begin
    tap = 4'd0;
    for (int t = 8; t >= 0; t--) if (pending[t]) tap = 4'(t);
    rd_req = (pending != '0);
    rd_x   = x + tap_dx(int'(tap));
    rd_y   = y + tap_dy(int'(tap));
    issue  = rd_req && rd_ready;
    busy   = rd_req;
  end

  always_ff @(posedge clk) begin
    if (rst)        pending <= '0;
    else if (start) pending <= tap_mask;
    else if (issue) pending[tap] <= 1'b0;
  end

  function automatic logic [3:0] norm(input logic signed [23:0] s, input logic [3:0] sh);
    logic signed [23:0] v;
    v = s >>> sh;
    if (v < 0)          return 4'd0;
    else if (v > 24'sd15) return 4'd15;
    else                return v[3:0];
  endfunction

  assign color = '{r: norm(sum_r, shift), g: norm(sum_g, shift), b: norm(sum_b, shift)};
endmodule
