// viz_pkg: types, constants and helper functions shared by the audio
// visualizer. It fixes the formats the blocks exchange: 12-bit RGB pixels,
// 16-bit signed processor words and coordinates, the 36-bit instruction word
// of the frame processor, and the map of configuration registers that feed the
// effects engine (motion, generators, blend mode, 3x3 convolution kernel).
// The document names the configuration registers (motion, generator and
// convolution parameters) but gives no encoding; every width, opcode and
// register number here is this design's own choice.
package viz_pkg;

  // ---------------------------------------------------------------- data
  localparam int unsigned WORD_W  = 16;  // processor register width
  localparam int unsigned NREGS   = 64;  // register file size
  localparam int unsigned RADDR_W = 6;
  localparam int unsigned INSTR_W = 36;  // one 36-bit block-RAM word
  localparam int unsigned SAMPLE_W = 8;  // audio sample, signed
  localparam int unsigned MAG_W    = 16; // spectrum magnitude, unsigned

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic signed [15:0]       coord_t;

  // 12-bit pixel, 4 bits per channel
  typedef struct packed {
    logic [3:0] r;
    logic [3:0] g;
    logic [3:0] b;
  } color_t;

  // ---------------------------------------------------------- instruction
  typedef enum logic [2:0] {
    OP_END  = 3'd0,   // empty word: end of the frame program
    OP_ALU  = 3'd1,   // rd <= A fn rB
    OP_ALUI = 3'd2,   // rd <= A fn imm
    OP_SKIP = 3'd3,   // if (rA != 0) skip imm instructions
    OP_CONV = 3'd4,   // run the convolution over the buffer
    OP_GEN  = 3'd5,   // run the generators over the buffer
    OP_NOP6 = 3'd6,
    OP_NOP7 = 3'd7
  } opcode_e;

  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUB = 3'd1, FN_MUL = 3'd2, FN_AND = 3'd3,
    FN_OR  = 3'd4, FN_XOR = 3'd5, FN_SLT = 3'd6, FN_SHR = 3'd7
  } alufn_e;

  typedef enum logic [1:0] {
    ASEL_REG = 2'd0, ASEL_BEAT = 2'd1, ASEL_BUTTONS = 2'd2, ASEL_ZERO = 2'd3
  } asel_e;

  typedef struct packed {
    opcode_e                op;     // [35:33]
    alufn_e                 fn;     // [32:30]
    asel_e                  asel;   // [29:28]
    logic [RADDR_W-1:0]     wa;     // [27:22]
    logic [RADDR_W-1:0]     ra;     // [21:16]
    logic [15:0]            imm;    // [15:0], rb = imm[5:0]
  } instr_t;

  // ------------------------------------------------- configuration registers
  typedef enum logic [1:0] {
    MOT_NONE = 2'd0, MOT_ROTATE = 2'd1, MOT_TRANSLATE = 2'd2, MOT_ZOOM = 2'd3
  } motion_e;

  typedef enum logic [1:0] {
    GEN_DISABLED = 2'd0, GEN_WAVEFORM = 2'd1, GEN_SCOPE = 2'd2, GEN_CIRCLE = 2'd3
  } gen_e;

  typedef enum logic [1:0] {
    BLEND_REPLACE = 2'd0, BLEND_ADD = 2'd1, BLEND_AVERAGE = 2'd2, BLEND_MAX = 2'd3
  } blend_e;

  localparam int unsigned N_MOTION = 2;
  localparam int unsigned N_GEN    = 2;

  localparam logic [RADDR_W-1:0] R_ZERO       = 6'd0;
  localparam logic [RADDR_W-1:0] R_MOT0_TYPE  = 6'd32; // +3 per motion unit
  localparam logic [RADDR_W-1:0] R_GEN0_TYPE  = 6'd38; // +4 per generator
  localparam logic [RADDR_W-1:0] R_BLEND_MODE = 6'd46;
  localparam logic [RADDR_W-1:0] R_CONV_SHIFT = 6'd47;
  localparam logic [RADDR_W-1:0] R_CONV00     = 6'd48; // 9 taps, row major

  typedef struct packed {
    motion_e kind;
    word_t   p1;
    word_t   p2;
  } motion_cfg_t;

  typedef struct packed {
    gen_e   kind;
    word_t  p1;
    word_t  p2;
    color_t color;
  } gen_cfg_t;

  typedef struct packed {
    motion_cfg_t [N_MOTION-1:0] mot;
    gen_cfg_t    [N_GEN-1:0]    gen;
    blend_e                     blend;
    logic [3:0]                 conv_shift;
    logic [8:0][WORD_W-1:0]     conv_k;   // conv_k[3*(dy+1)+(dx+1)]
  } fx_params_t;

  // ------------------------------------------------------------- helpers
  // sin(2*pi*i/n) in Q1.14, by a Taylor series after reducing the angle to [-pi, pi].
  // Used only to fill constant tables at start-up.
  function automatic logic signed [15:0] sin_q14(input int i, input int n);
    real a, t, s;
    int  ii;
    ii = i % n;
    if (ii < 0) ii = ii + n;
    a = 6.283185307179586 * real'(ii) / real'(n);
    if (a > 3.141592653589793) a = a - 6.283185307179586;   // now |a| <= pi
    t = a; s = a;
    for (int k = 1; k < 14; k++) begin
      t = -t * a * a / real'((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return 16'($rtoi(s * 16384.0 + (s >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic color_t sat_add(input color_t a, input color_t b);
    logic [4:0] r, g, bl;
    r  = {1'b0, a.r} + {1'b0, b.r};
    g  = {1'b0, a.g} + {1'b0, b.g};
    bl = {1'b0, a.b} + {1'b0, b.b};
    return '{r: r[4] ? 4'hF : r[3:0], g: g[4] ? 4'hF : g[3:0], b: bl[4] ? 4'hF : bl[3:0]};
  endfunction

  // Offsets of convolution tap t (0..8, row major): dx = t%3-1, dy = t/3-1.
  function automatic coord_t tap_dx(input int t);
    return coord_t'(t % 3 - 1);
  endfunction
  function automatic coord_t tap_dy(input int t);
    return coord_t'(t / 3 - 1);
  endfunction

  // Taps that take part in the convolution of the pixel whose source
  // position is (x, y): nonzero coefficient and neighbour inside the
  // w x h buffer.
  function automatic logic [8:0] conv_tap_mask(input logic [8:0][WORD_W-1:0] k,
                                               input coord_t x, input coord_t y,
                                               input int w, input int h);
    logic [8:0] m;
    coord_t nx, ny;
    for (int t = 0; t < 9; t++) begin
      nx = x + tap_dx(t);
      ny = y + tap_dy(t);
      m[t] = (k[t] != '0) && (nx >= 0) && (ny >= 0) &&
             (int'(nx) < w) && (int'(ny) < h);
    end
    return m;
  endfunction

endpackage
