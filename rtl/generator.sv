// generator: draws one pattern, deciding for each pixel whether it is lit.
// Works on the translated coordinates (x, y) of the pixel being produced and
// audio data fetched through its own read ports (data one clock after the
// address, which depends only on the coordinates and so is steady while a
// pixel is worked on):
//   WAVEFORM  the audio trace: sample age x, lit when |y - (p1 + s*p2/16)| <= 1;
//   SCOPE     spectrum bars: bin x >> p2[3:0], bar height mag >> p2[7:4]
//             standing on line p1, lit when 0 <= p1 - y < height;
//   CIRCLE    a ring about the buffer centre, radius p1, half-width p2;
//   DISABLED  never lit.
// lit and color are combinational from the read data. The document names
// waveform, scope and circle generators fed by the sample buffer and the FFT
// RAM; the drawing rules and the parameter meanings are this design's.
module generator
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512,
  parameter int unsigned DEPTH    = 48000,
  parameter int unsigned N_BINS   = 128,
  localparam int unsigned AGE_W   = $clog2(DEPTH),
  localparam int unsigned BW      = $clog2(N_BINS)
) (
  input  coord_t                     x,
  input  coord_t                     y,
  input  gen_cfg_t                   cfg,
  output logic [AGE_W-1:0]           sample_age,
  input  logic signed [SAMPLE_W-1:0] sample,
  output logic [BW-1:0]              bin,
  input  logic [MAG_W-1:0]           mag,
  output logic                       lit,
  output color_t                     color
);
  logic signed [31:0] target, dy, dxc, dyc, d2, rin, rout;
  logic [15:0]        bin_full, height;

  always_comb begin
    // read addresses
    if (x < 0)                          sample_age = '0;
    else if (int'(x) >= int'(DEPTH))    sample_age = AGE_W'(DEPTH - 1);
    else                                sample_age = AGE_W'(x);
    bin_full = (x < 0) ? 16'd0 : 16'(x) >> cfg.p2[3:0];
    bin      = (bin_full >= 16'(N_BINS)) ? BW'(N_BINS - 1) : BW'(bin_full);

    color  = cfg.color;
    height = mag >> cfg.p2[7:4];
    target = 32'(cfg.p1) + ((32'(sample) * 32'(cfg.p2)) >>> 4);
    dy     = 32'(y) - target;
    dxc    = 32'(x) - 32'(GLOBAL_W / 2);
    dyc    = 32'(y) - 32'(GLOBAL_H / 2);
    d2     = dxc * dxc + dyc * dyc;
    rin    = (cfg.p1 > cfg.p2) ? 32'(cfg.p1) - 32'(cfg.p2) : 32'sd0;
    rout   = 32'(cfg.p1) + 32'(cfg.p2);
    unique case (cfg.kind)
      GEN_WAVEFORM: lit = (dy >= -32'sd1) && (dy <= 32'sd1) && (x >= 0);
      GEN_SCOPE:    lit = (y <= cfg.p1) && ((32'(cfg.p1) - 32'(y)) < 32'(height)) && (x >= 0);
      GEN_CIRCLE:   lit = (d2 >= rin * rin) && (d2 <= rout * rout);
      default:      lit = 1'b0;
    endcase
  end
endmodule
