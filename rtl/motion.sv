// motion: one motion effect, as a displacement vector per pixel.
// For the pixel (x, y) being produced it returns the vector (vx, vy) to add to
// the coordinates the effects read from, so the picture appears moved:
//   TRANSLATE  (p1, p2);
//   ROTATE     rotation by p1 * 360/256 degrees about the buffer centre:
//              R(p1) (x-cx, y-cy) - (x-cx, y-cy), sine and cosine from a
//              256-entry Q1.14 table;
//   ZOOM       scaling by p1/256 about the centre: (x-cx)*p1/256 - (x-cx);
//   NONE       (0, 0).
// Combinational. The document names rotate, translate and zoom and says that
// each motion unit takes parameters from the register file and coordinates
// from the pixel sequencer; the parameter meanings and the fixed-point
// formats are this design's.
// Only the low 16 bits of the 32-bit zoom products are kept (coordinates are
// 16 bits), so their upper bits are unused.
module motion
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512
) (
  input  coord_t      x,
  input  coord_t      y,
  input  motion_cfg_t cfg,
  output coord_t      vx,
  output coord_t      vy
);
  logic signed [15:0] sin_t [256];
  initial for (int i = 0; i < 256; i++) sin_t[i] = sin_q14(i, 256);

  coord_t rx, ry;
  logic signed [15:0] s, c;
  logic signed [31:0] px, py;
  logic [7:0] ang, ang_c;

  always_comb begin
    rx    = x - coord_t'(GLOBAL_W / 2);
    ry    = y - coord_t'(GLOBAL_H / 2);
    ang   = cfg.p1[7:0];
    ang_c = ang + 8'd64;          // cos(a) = sin(a + 90 degrees)
    s     = sin_t[ang];
    c     = sin_t[ang_c];
    px    = '0;
    py    = '0;
    vx    = '0;
    vy    = '0;
    unique case (cfg.kind)
      MOT_TRANSLATE: begin
        vx = cfg.p1;
        vy = cfg.p2;
      end
      MOT_ROTATE: begin
        px = (32'(c) * 32'(rx) - 32'(s) * 32'(ry)) >>> 14;
        py = (32'(s) * 32'(rx) + 32'(c) * 32'(ry)) >>> 14;
        vx = coord_t'(px) - rx;
        vy = coord_t'(py) - ry;
      end
      MOT_ZOOM: begin
        px = (32'(rx) * 32'(cfg.p1)) >>> 8;
        py = (32'(ry) * 32'(cfg.p1)) >>> 8;
        vx = coord_t'(px) - rx;
        vy = coord_t'(py) - ry;
      end
      default: ;
    endcase
  end
endmodule
