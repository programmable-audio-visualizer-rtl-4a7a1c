// effects: the engine that redraws the back frame buffer, one sweep per
// convolve or generate instruction.
// pixel_fsm visits every pixel (x, y). The N_MOTION motion units turn the
// motion registers into displacement vectors and translate adds them, giving
// source coordinates (xt, yt). Then, per mode:
//   convolve  conv_fsm reads the 3x3 neighbourhood of (xt, yt) from the FRONT
//             buffer (the frame on screen), mult_add weighs it with the kernel
//             registers, and the scaled, clamped result is the new pixel; so
//             motion and kernel act on last frame's picture (trails, blur,
//             edge detection, rotation, zoom).
//   generate  the N_GEN generators draw at (xt, yt) from the audio data,
//             pixel_fsm reads the pixel already in the BACK buffer (what this
//             frame has drawn so far), and blend merges the two.
// The effect-function multiplexer picks the convolution or the blend colour
// and pixel_fsm writes it to (x, y) of the back buffer. Per pixel,
// effects_time_logic gives the clock budget and the timer counts it, frozen
// in clocks where a memory request is refused. With no refusals a pixel takes
// taps + 5 clocks when convolving and 6 when generating.
// Memory ports follow memory_manager (read data two clocks after the grant);
// generator audio ports are one-clock block-RAM reads.
// The block structure is the document's effects diagram; the interfaces,
// modes and timing are this design's.
module effects
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512,
  parameter int unsigned DEPTH    = 48000,
  parameter int unsigned N_BINS   = 128,
  localparam int unsigned AGE_W   = $clog2(DEPTH),
  localparam int unsigned BW      = $clog2(N_BINS),
  localparam int unsigned RD_LAT  = 2
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic                                   c_enable,
  input  logic                                   g_enable,
  input  fx_params_t                             params,
  output logic                                   busy,
  // memory manager, effects read port
  output logic                                   rd_req,
  output logic                                   rd_front,
  output coord_t                                 rd_x,
  output coord_t                                 rd_y,
  input  logic                                   rd_ready,
  input  logic                                   rd_valid,
  input  color_t                                 rd_color,
  // memory manager, effects write port
  output logic                                   wr_req,
  output coord_t                                 wr_x,
  output coord_t                                 wr_y,
  output color_t                                 wr_color,
  input  logic                                   wr_ready,
  // audio data for the generators
  output logic [N_GEN-1:0][AGE_W-1:0]            sample_age,
  input  logic [N_GEN-1:0][SAMPLE_W-1:0]         sample,
  output logic [N_GEN-1:0][BW-1:0]               bin,
  input  logic [N_GEN-1:0][MAG_W-1:0]            mag
);
  logic   conv_mode, start, timer_done, timer_start;
  coord_t x, y, xt, yt;
  logic   pix_rd_req;
  logic [8:0]  tap_mask;
  logic [31:0] t_value;

  pixel_fsm #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H)) u_pix (
    .clk, .rst, .c_enable, .g_enable, .busy, .conv_mode, .x, .y, .start,
    .timer_done, .pix_rd_req, .pix_rd_ready(rd_ready), .wr_req, .wr_ready
  );
  assign timer_start = start;

  // motion and translation
  coord_t [N_MOTION-1:0] vx, vy;
  for (genvar m = 0; m < N_MOTION; m++) begin : g_mot
    motion #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H)) u_mot (
      .x, .y, .cfg(params.mot[m]), .vx(vx[m]), .vy(vy[m])
    );
  end
  translate #(.N(N_MOTION)) u_tr (.x, .y, .vx, .vy, .xt, .yt);

  // per-pixel clock budget
  effects_time_logic #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H), .RD_LAT(RD_LAT)) u_etl (
    .conv_mode, .conv_k(params.conv_k), .x(xt), .y(yt), .tap_mask, .value(t_value)
  );

  // convolution
  logic         c_rd_req, c_issue, c_busy;
  coord_t       c_rd_x, c_rd_y;
  logic [3:0]   c_tap;
  logic signed [23:0] sum_r, sum_g, sum_b;
  color_t       conv_color;

  conv_fsm u_conv (
    .clk, .rst, .start(start && conv_mode), .tap_mask, .x(xt), .y(yt),
    .rd_req(c_rd_req), .rd_x(c_rd_x), .rd_y(c_rd_y), .rd_ready, .issue(c_issue),
    .tap(c_tap), .busy(c_busy), .sum_r, .sum_g, .sum_b,
    .shift(params.conv_shift), .color(conv_color)
  );

  mult_add #(.LAT(RD_LAT)) u_mac (
    .clk, .rst, .clear(start), .issue(c_issue), .tap(c_tap), .rd_valid(rd_valid && conv_mode),
    .rd_color, .k(params.conv_k), .sum_r, .sum_g, .sum_b
  );

  // generators and blend
  logic   [N_GEN-1:0] lit;
  color_t [N_GEN-1:0] gcol;
  color_t             mem_pix, blend_color;
  for (genvar g = 0; g < N_GEN; g++) begin : g_gen
    generator #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H), .DEPTH(DEPTH), .N_BINS(N_BINS)) u_gen (
      .x(xt), .y(yt), .cfg(params.gen[g]), .sample_age(sample_age[g]), .sample(sample[g]),
      .bin(bin[g]), .mag(mag[g]), .lit(lit[g]), .color(gcol[g])
    );
  end

  always_ff @(posedge clk) begin
    if (rst)                          mem_pix <= '0;
    else if (rd_valid && !conv_mode)  mem_pix <= rd_color;
  end

  blend #(.N(N_GEN)) u_blend (
    .mode(params.blend), .mem(mem_pix), .lit, .gen(gcol), .color(blend_color)
  );

  // memory request multiplexing and the effect-function mux
  assign rd_req   = conv_mode ? c_rd_req : pix_rd_req;
  assign rd_front = conv_mode;
  assign rd_x     = conv_mode ? c_rd_x : x;
  assign rd_y     = conv_mode ? c_rd_y : y;
  assign wr_x     = x;
  assign wr_y     = y;
  assign wr_color = conv_mode ? conv_color : blend_color;

  timer #(.W(32)) u_timer (
    .clk, .rst, .start(timer_start), .value(t_value),
    .en(!(rd_req && !rd_ready)), .done(timer_done)
  );

  // the convolution walker must be finished when the pixel is written
  always_ff @(posedge clk) begin
    if (!rst) assert (!(wr_req && c_busy))
      else $error("effects: pixel written before its taps were read");
  end
endmodule
