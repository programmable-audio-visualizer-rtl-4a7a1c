// xvga: video timing for one display.
// A horizontal and a vertical counter scan the screen; while the beam is in
// the visible area the block requests the pixel at screen coordinates
// (hcount, vcount). The colour for a request comes back LAT clocks later
// (through display and memory_manager), so hsync, vsync and blank are delayed
// by LAT clocks to stay aligned with it, and the colour is forced to black in
// blanking. frame_end pulses for one clock when the last visible line has been
// requested (hcount = 0, vcount = V_ACTIVE): the point where a finished frame
// may be swapped in. Default timing is the 640x480 at 60 Hz VGA mode
// (25.175 MHz pixel clock, negative syncs); the document names the display
// interface but gives no mode, so the mode is this design's choice.
module xvga
  import viz_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned LAT      = 2
) (
  input  logic   clk,
  input  logic   rst,
  output coord_t hcount,
  output coord_t vcount,
  output logic   req,          // (hcount, vcount) is a visible pixel
  input  color_t color,        // answer to the request made LAT clocks ago
  output color_t vga_rgb,
  output logic   vga_hsync_n,
  output logic   vga_vsync_n,
  output logic   vga_blank,
  output logic   frame_end
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == coord_t'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == coord_t'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  logic hs, vs;
  always_comb begin
    req = (hcount < coord_t'(H_ACTIVE)) && (vcount < coord_t'(V_ACTIVE));
    hs  = (hcount >= coord_t'(H_ACTIVE + H_FP)) && (hcount < coord_t'(H_ACTIVE + H_FP + H_SYNC));
    vs  = (vcount >= coord_t'(V_ACTIVE + V_FP)) && (vcount < coord_t'(V_ACTIVE + V_FP + V_SYNC));
    frame_end = (hcount == '0) && (vcount == coord_t'(V_ACTIVE));
  end

  // align the syncs with the colour that returns LAT clocks later
  logic [LAT-1:0] hs_d, vs_d, act_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d  <= '0;
      vs_d  <= '0;
      act_d <= '0;
    end else begin
      hs_d  <= {hs_d[LAT-2:0], hs};
      vs_d  <= {vs_d[LAT-2:0], vs};
      act_d <= {act_d[LAT-2:0], req};
    end
  end

  assign vga_hsync_n = ~hs_d[LAT-1];
  assign vga_vsync_n = ~vs_d[LAT-1];
  assign vga_blank   = ~act_d[LAT-1];
  assign vga_rgb     = act_d[LAT-1] ? color : '0;
endmodule
