// mult_add: multiply-accumulate unit of the 3x3 convolution.
// conv_fsm reports each read it gets granted (issue) together with the tap
// index (its offset in the 3x3 window). The pixel value for that read comes
// back from the memory manager LAT clocks later (rd_valid, rd_color); the tap
// index travels down a LAT-stage delay line to meet it, selects the kernel
// coefficient k[tap] (signed 16-bit, from the configuration registers) and
// the products k * channel are added to three signed running sums, one per
// colour channel. clear zeroes the sums at the start of a pixel. The
// document gives this function; the delay-line alignment and the widths are
// this design's.
module mult_add
  import viz_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   issue,
  input  logic [3:0]             tap,
  input  logic                   rd_valid,
  input  color_t                 rd_color,
  input  logic [8:0][WORD_W-1:0] k,
  output logic signed [23:0]     sum_r,
  output logic signed [23:0]     sum_g,
  output logic signed [23:0]     sum_b
);
  logic [LAT-1:0][3:0] tap_d;
  always_ff @(posedge clk) begin
    if (rst) tap_d <= '0;
    else begin
      tap_d[0] <= issue ? tap : 4'd0;
      for (int i = 1; i < int'(LAT); i++) tap_d[i] <= tap_d[i-1];
    end
  end

  word_t coef;
  assign coef = (tap_d[LAT-1] < 4'd9) ? word_t'(k[tap_d[LAT-1]]) : '0;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum_r <= '0;
      sum_g <= '0;
      sum_b <= '0;
    end else if (rd_valid) begin
      sum_r <= sum_r + 24'(coef * $signed({1'b0, rd_color.r}));
      sum_g <= sum_g + 24'(coef * $signed({1'b0, rd_color.g}));
      sum_b <= sum_b + 24'(coef * $signed({1'b0, rd_color.b}));
    end
  end
endmodule
