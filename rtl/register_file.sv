// register_file: the processor's 64 x 16-bit registers.
// One write port (wa, wd, we) and two read ports addressed by the current
// instruction (ra, rb; asynchronous). Register 0 always reads zero. Registers
// 32..63 are the configuration registers of the effects engine; they are also
// read through fixed ports, gathered into the fx_params structure (motion
// units, generators, blend mode, convolution shift and 3x3 kernel; map in
// viz_pkg). All registers clear at reset. The document gives the one-write,
// many-read organisation; the size and the register map are this design's.
module register_file
  import viz_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               we,
  input  logic [RADDR_W-1:0] wa,
  input  word_t              wd,
  input  logic [RADDR_W-1:0] ra,
  input  logic [RADDR_W-1:0] rb,
  output word_t              rda,
  output word_t              rdb,
  output fx_params_t         fx_params
);
  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rda = (ra == '0) ? '0 : regs[ra];
  assign rdb = (rb == '0) ? '0 : regs[rb];

  always_comb begin
    for (int m = 0; m < int'(N_MOTION); m++) begin
      fx_params.mot[m].kind = motion_e'(regs[int'(R_MOT0_TYPE) + 3*m][1:0]);
      fx_params.mot[m].p1   = regs[int'(R_MOT0_TYPE) + 3*m + 1];
      fx_params.mot[m].p2   = regs[int'(R_MOT0_TYPE) + 3*m + 2];
    end
    for (int g = 0; g < int'(N_GEN); g++) begin
      fx_params.gen[g].kind  = gen_e'(regs[int'(R_GEN0_TYPE) + 4*g][1:0]);
      fx_params.gen[g].p1    = regs[int'(R_GEN0_TYPE) + 4*g + 1];
      fx_params.gen[g].p2    = regs[int'(R_GEN0_TYPE) + 4*g + 2];
      fx_params.gen[g].color = color_t'(regs[int'(R_GEN0_TYPE) + 4*g + 3][11:0]);
    end
    fx_params.blend      = blend_e'(regs[R_BLEND_MODE][1:0]);
    fx_params.conv_shift = regs[R_CONV_SHIFT][3:0];
    for (int t = 0; t < 9; t++) fx_params.conv_k[t] = regs[int'(R_CONV00) + t];
  end
endmodule
