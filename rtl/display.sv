// display: places one physical screen on the large virtual buffer.
// It adds the screen's position (x_off, y_off) in the virtual buffer to the
// screen coordinates requested by its xvga timing block and forwards the
// request to the memory manager in global coordinates; the colour that comes
// back is handed to xvga unchanged. Offsets chosen to match the monitors'
// physical arrangement make several screens show one continuous picture, as
// the document intends. Purely combinational: it adds no latency. The
// position is an input so that screens can be rearranged without rebuilding;
// the top ties it to constants.
module display
  import viz_pkg::*;
(
  input  coord_t x_off,
  input  coord_t y_off,
  input  coord_t screen_x,
  input  coord_t screen_y,
  input  logic   screen_req,
  output color_t screen_color,
  output coord_t global_x,
  output coord_t global_y,
  output logic   global_req,
  input  color_t global_color
);
  assign global_x     = screen_x + x_off;
  assign global_y     = screen_y + y_off;
  assign global_req   = screen_req;
  assign screen_color = global_color;
endmodule
