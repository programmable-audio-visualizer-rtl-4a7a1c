// memory_manager: maps the two virtual frame buffers onto external SRAMs and
// shares the SRAM ports between the displays and the effects engine.
// Both buffers are GLOBAL_W x GLOBAL_H pixels. The buffer is cut into N_SRAM
// vertical strips of STRIP_W = GLOBAL_W / N_SRAM columns; strip s of both
// buffers lives in SRAM s at word address
//   buf * STRIP_W * GLOBAL_H + y * STRIP_W + (x - s * STRIP_W),
// one 12-bit pixel per word. flip names the front buffer: displays always read
// buffer flip, the effects engine writes buffer ~flip and reads either one
// (fx_rd_front). Each SRAM does one access per clock. Displays have priority
// (a screen must get a pixel every clock), then effects reads, then effects
// writes; an effects request waits (ready low) while its SRAM is busy. A
// display placed inside its own strip therefore never collides with another
// display, the restriction the document suggests; if two displays do hit one
// SRAM, the lower-numbered one wins and the other shows black for that pixel.
// Coordinates outside the buffer read as black and writes there are dropped.
// Timing: SRAMs return read data one clock after the address; the manager
// registers it once more, so a display colour or an effects read (fx_rd_valid)
// arrives two clocks after the request was granted.
// The document gives the manager's task, the double buffering and the port
// list; the strip mapping, the priorities and the latencies are this design's.
module memory_manager
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512,
  parameter int unsigned N_SRAM   = 2,
  parameter int unsigned N_DISP   = 2,
  localparam int unsigned STRIP_W = GLOBAL_W / N_SRAM,
  localparam int unsigned SRAM_AW = $clog2(2 * STRIP_W * GLOBAL_H),
  localparam int unsigned SW      = (N_SRAM > 1) ? $clog2(N_SRAM) : 1
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           flip,
  // display read ports
  input  logic   [N_DISP-1:0]            disp_req,
  input  coord_t [N_DISP-1:0]            disp_x,
  input  coord_t [N_DISP-1:0]            disp_y,
  output color_t [N_DISP-1:0]            disp_color,
  // effects read port
  input  logic                           fx_rd_req,
  input  logic                           fx_rd_front,
  input  coord_t                         fx_rd_x,
  input  coord_t                         fx_rd_y,
  output logic                           fx_rd_ready,
  output logic                           fx_rd_valid,
  output color_t                         fx_rd_color,
  // effects write port (always the back buffer)
  input  logic                           fx_wr_req,
  input  coord_t                         fx_wr_x,
  input  coord_t                         fx_wr_y,
  input  color_t                         fx_wr_color,
  output logic                           fx_wr_ready,
  // SRAM ports
  output logic   [N_SRAM-1:0]            sram_en,
  output logic   [N_SRAM-1:0]            sram_we,
  output logic   [N_SRAM-1:0][SRAM_AW-1:0] sram_addr,
  output color_t [N_SRAM-1:0]            sram_wdata,
  input  color_t [N_SRAM-1:0]            sram_rdata
);
  typedef struct packed {
    logic               inb;
    logic [SW-1:0]      s;
    logic [SRAM_AW-1:0] addr;
  } loc_t;

  function automatic loc_t locate(input coord_t x, input coord_t y, input logic b);
    loc_t l;
    int   lx;
    l.inb = (x >= 0) && (y >= 0) && (x < coord_t'(GLOBAL_W)) && (y < coord_t'(GLOBAL_H));
    l.s   = '0;
    lx    = int'(x);
    for (int i = 1; i < int'(N_SRAM); i++)
      if (int'(x) >= i * int'(STRIP_W)) begin
        l.s = SW'(i);
        lx  = int'(x) - i * int'(STRIP_W);
      end
    l.addr = SRAM_AW'(int'(b) * int'(STRIP_W * GLOBAL_H) + int'(y) * int'(STRIP_W) + lx);
    return l;
  endfunction

  loc_t [N_DISP-1:0] dl;
  loc_t              rl, wl;
  logic [N_SRAM-1:0] busy_disp, busy_rd;
  logic [N_DISP-1:0] disp_served;
  logic              fx_rd_served;   // a real SRAM read was issued for fx

  always_comb begin
    for (int d = 0; d < int'(N_DISP); d++) dl[d] = locate(disp_x[d], disp_y[d], flip);
    rl = locate(fx_rd_x, fx_rd_y, fx_rd_front ? flip : ~flip);
    wl = locate(fx_wr_x, fx_wr_y, ~flip);

    sram_en     = '0;
    sram_we     = '0;
    sram_addr   = '0;
    sram_wdata  = '0;
    busy_disp   = '0;
    busy_rd     = '0;
    disp_served = '0;
    // displays first, lower index wins
    for (int d = 0; d < int'(N_DISP); d++) begin
      if (disp_req[d] && dl[d].inb && !busy_disp[dl[d].s]) begin
        busy_disp[dl[d].s]   = 1'b1;
        disp_served[d]       = 1'b1;
        sram_en[dl[d].s]     = 1'b1;
        sram_addr[dl[d].s]   = dl[d].addr;
      end
    end
    // effects read
    fx_rd_served = 1'b0;
    fx_rd_ready  = 1'b0;
    if (fx_rd_req) begin
      if (!rl.inb) fx_rd_ready = 1'b1;
      else if (!busy_disp[rl.s]) begin
        fx_rd_ready         = 1'b1;
        fx_rd_served        = 1'b1;
        busy_rd[rl.s]       = 1'b1;
        sram_en[rl.s]       = 1'b1;
        sram_addr[rl.s]     = rl.addr;
      end
    end
    // effects write
    fx_wr_ready = 1'b0;
    if (fx_wr_req) begin
      if (!wl.inb) fx_wr_ready = 1'b1;
      else if (!busy_disp[wl.s] && !busy_rd[wl.s]) begin
        fx_wr_ready        = 1'b1;
        sram_en[wl.s]      = 1'b1;
        sram_we[wl.s]      = 1'b1;
        sram_addr[wl.s]    = wl.addr;
        sram_wdata[wl.s]   = fx_wr_color;
      end
    end
  end

  // stage 1: remember who each SRAM answers next clock
  logic [N_DISP-1:0]         disp_v1;
  logic [N_DISP-1:0][SW-1:0] disp_s1;
  logic                      fx_v1, fx_mem1;
  logic [SW-1:0]             fx_s1;
  always_ff @(posedge clk) begin
    if (rst) begin
      disp_v1 <= '0;
      disp_s1 <= '0;
      fx_v1   <= 1'b0;
      fx_mem1 <= 1'b0;
      fx_s1   <= '0;
    end else begin
      disp_v1 <= disp_served;
      for (int d = 0; d < int'(N_DISP); d++) disp_s1[d] <= dl[d].s;
      fx_v1   <= fx_rd_req && fx_rd_ready;
      fx_mem1 <= fx_rd_served;
      fx_s1   <= rl.s;
    end
  end

  // stage 2: registered outputs
  always_ff @(posedge clk) begin
    if (rst) begin
      disp_color  <= '0;
      fx_rd_valid <= 1'b0;
      fx_rd_color <= '0;
    end else begin
      for (int d = 0; d < int'(N_DISP); d++)
        disp_color[d] <= disp_v1[d] ? sram_rdata[disp_s1[d]] : '0;
      fx_rd_valid <= fx_v1;
      fx_rd_color <= fx_mem1 ? sram_rdata[fx_s1] : '0;
    end
  end
endmodule
