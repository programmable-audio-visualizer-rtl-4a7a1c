// visualizer_top: the complete programmable audio visualizer.
// Three parts run side by side:
//   audio front end   samples from the codec interface fill sample_fifo (the
//                     last second of audio); at every new frame fft computes
//                     the spectrum into fft_bram, and when it finishes
//                     beat_detect turns bass energy and loudness into a beat
//                     value;
//   frame processor   runs the user program once per frame, doing arithmetic
//                     on registers (with the beat and the buttons as inputs)
//                     and launching convolve / generate sweeps of the effects
//                     engine, which redraws the back buffer through the
//                     memory manager;
//   display output    N_DISP xvga timing blocks, each placed on the virtual
//                     buffer by a display block, read the front buffer
//                     through the memory manager.
// The frame boundary is display 0's end of visible area (frame_end): it
// starts the FFT and releases the processor waiting at the end of its
// program, which then flips the buffers and starts over.
// The external parts stay outside: the audio codec interface delivers
// sample/sample_valid, the SRAM chips are reached through the sram_* ports
// (one-clock synchronous reads), and a host loads the program through imem_*.
// Defaults: two 640x480 screens side by side on a 1280x512 virtual buffer in
// two SRAMs, 48 kHz 8-bit audio, 256-point spectrum, 1024-word program.
// Left unconnected on purpose: the FFT busy flag, the beat detector's pulse
// and busy outputs (the level-valued beat_value and beat are used instead), and
// frame_end of every display but the first, which defines the frame.
module visualizer_top
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W   = 1280,
  parameter int unsigned GLOBAL_H   = 512,
  parameter int unsigned N_SRAM     = 2,
  parameter int unsigned N_DISP     = 2,
  parameter int unsigned DEPTH      = 48000,
  parameter int unsigned FFT_N      = 256,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned NBUTTONS   = 8,
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  localparam int unsigned STRIP_W   = GLOBAL_W / N_SRAM,
  localparam int unsigned SRAM_AW   = $clog2(2 * STRIP_W * GLOBAL_H),
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH),
  localparam int unsigned AGE_W     = $clog2(DEPTH),
  localparam int unsigned N_BINS    = FFT_N / 2,
  localparam int unsigned BW        = $clog2(N_BINS)
) (
  input  logic                             clk,
  input  logic                             rst,
  // audio codec interface
  input  logic                             sample_valid,
  input  logic signed [SAMPLE_W-1:0]       sample,
  // program loading and user inputs
  input  logic                             imem_we,
  input  logic [IAW-1:0]                   imem_waddr,
  input  instr_t                           imem_wdata,
  input  logic [NBUTTONS-1:0]              buttons,
  // displays
  output color_t [N_DISP-1:0]              vga_rgb,
  output logic   [N_DISP-1:0]              vga_hsync_n,
  output logic   [N_DISP-1:0]              vga_vsync_n,
  output logic   [N_DISP-1:0]              vga_blank,
  // SRAM chips
  output logic   [N_SRAM-1:0]              sram_en,
  output logic   [N_SRAM-1:0]              sram_we,
  output logic   [N_SRAM-1:0][SRAM_AW-1:0] sram_addr,
  output color_t [N_SRAM-1:0]              sram_wdata,
  input  color_t [N_SRAM-1:0]              sram_rdata,
  // status
  output word_t                            beat_value,
  output logic                             beat,
  output logic                             flip,
  output logic [IAW-1:0]                   pc
);
  // ------------------------------------------------------ audio front end
  localparam int unsigned N_SRD = 2 + N_GEN;   // fft, beat, generators
  localparam int unsigned N_FRD = 1 + N_GEN;   // beat, generators

  logic [N_SRD-1:0][AGE_W-1:0]    s_age;
  logic [N_SRD-1:0][SAMPLE_W-1:0] s_data;
  logic [N_FRD-1:0][BW-1:0]       f_addr;
  logic [N_FRD-1:0][MAG_W-1:0]    f_data;
  logic                           f_we, fft_busy, fft_done, beat_pulse, beat_busy;
  logic [BW-1:0]                  f_waddr;
  logic [MAG_W-1:0]               f_wdata;
  logic                           new_frame;

  sample_fifo #(.DEPTH(DEPTH), .N_RD(N_SRD)) u_fifo (
    .clk, .rst, .in_valid(sample_valid), .in_sample(sample),
    .rd_age(s_age), .rd_data(s_data)
  );

  fft #(.N(FFT_N), .AGE_W(AGE_W)) u_fft (
    .clk, .rst, .new_frame, .rd_age(s_age[0]), .rd_data(s_data[0]),
    .we(f_we), .waddr(f_waddr), .wdata(f_wdata), .busy(fft_busy), .done(fft_done)
  );

  fft_bram #(.N_BINS(N_BINS), .N_RD(N_FRD)) u_fbram (
    .clk, .we(f_we), .waddr(f_waddr), .wdata(f_wdata), .raddr(f_addr), .rdata(f_data)
  );

  beat_detect #(.N_BINS(N_BINS), .AGE_W(AGE_W)) u_beat (
    .clk, .rst, .start(fft_done), .bin_addr(f_addr[0]), .bin_data(f_data[0]),
    .rd_age(s_age[1]), .rd_data(s_data[1]), .beat_value, .beat, .beat_pulse,
    .busy(beat_busy)
  );

  // ------------------------------------------------------ frame processor
  logic       c_enable, g_enable, fx_busy;
  fx_params_t fx_params;

  processor #(.IMEM_DEPTH(IMEM_DEPTH), .PIXELS(GLOBAL_W * GLOBAL_H), .NBUTTONS(NBUTTONS)) u_proc (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .beat(beat_value), .buttons,
    .frame_sync(new_frame), .fx_busy, .c_enable, .g_enable, .fx_params, .flip, .pc
  );

  // ------------------------------------------------------ effects engine
  logic   rd_req, rd_front, rd_ready, rd_valid, wr_req, wr_ready;
  coord_t rd_x, rd_y, wr_x, wr_y;
  color_t rd_color, wr_color;
  logic [N_GEN-1:0][SAMPLE_W-1:0] g_sample;
  logic [N_GEN-1:0][AGE_W-1:0]    g_age;
  logic [N_GEN-1:0][BW-1:0]       g_bin;
  logic [N_GEN-1:0][MAG_W-1:0]    g_mag;

  for (genvar g = 0; g < N_GEN; g++) begin : g_audio
    assign s_age[2 + g]  = g_age[g];
    assign g_sample[g]   = s_data[2 + g];
    assign f_addr[1 + g] = g_bin[g];
    assign g_mag[g]      = f_data[1 + g];
  end

  effects #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H), .DEPTH(DEPTH), .N_BINS(N_BINS)) u_fx (
    .clk, .rst, .c_enable, .g_enable, .params(fx_params), .busy(fx_busy),
    .rd_req, .rd_front, .rd_x, .rd_y, .rd_ready, .rd_valid, .rd_color,
    .wr_req, .wr_x, .wr_y, .wr_color, .wr_ready,
    .sample_age(g_age), .sample(g_sample), .bin(g_bin), .mag(g_mag)
  );

  // ------------------------------------------------------ displays
  logic   [N_DISP-1:0] s_req, g_req, frame_end;
  coord_t [N_DISP-1:0] s_x, s_y, g_x, g_y;
  color_t [N_DISP-1:0] s_color, g_color;

  for (genvar d = 0; d < N_DISP; d++) begin : g_disp
    xvga #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
           .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP), .LAT(2)) u_xvga (
      .clk, .rst, .hcount(s_x[d]), .vcount(s_y[d]), .req(s_req[d]), .color(s_color[d]),
      .vga_rgb(vga_rgb[d]), .vga_hsync_n(vga_hsync_n[d]), .vga_vsync_n(vga_vsync_n[d]),
      .vga_blank(vga_blank[d]), .frame_end(frame_end[d])
    );
    display u_display (
      .x_off(coord_t'(d * int'(GLOBAL_W / N_DISP))), .y_off('0),
      .screen_x(s_x[d]), .screen_y(s_y[d]), .screen_req(s_req[d]), .screen_color(s_color[d]),
      .global_x(g_x[d]), .global_y(g_y[d]), .global_req(g_req[d]), .global_color(g_color[d])
    );
  end
  assign new_frame = frame_end[0];

  memory_manager #(.GLOBAL_W(GLOBAL_W), .GLOBAL_H(GLOBAL_H), .N_SRAM(N_SRAM), .N_DISP(N_DISP)) u_mm (
    .clk, .rst, .flip,
    .disp_req(g_req), .disp_x(g_x), .disp_y(g_y), .disp_color(g_color),
    .fx_rd_req(rd_req), .fx_rd_front(rd_front), .fx_rd_x(rd_x), .fx_rd_y(rd_y),
    .fx_rd_ready(rd_ready), .fx_rd_valid(rd_valid), .fx_rd_color(rd_color),
    .fx_wr_req(wr_req), .fx_wr_x(wr_x), .fx_wr_y(wr_y), .fx_wr_color(wr_color),
    .fx_wr_ready(wr_ready),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );
endmodule
