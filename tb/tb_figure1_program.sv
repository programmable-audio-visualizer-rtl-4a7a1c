// tb_figure1_program: runs the example frame program of the original
// description on the whole visualizer (reduced size: 16 x 8 virtual buffer
// on two 8 x 8 screens, 32-point spectrum, short frames). The pseudo-code is
// hand-assembled into this design's instruction set:
//   if (resetbutton) skip 1; rANGLE <= 0          (button 0 copied to r10)
//   motion 0 = rotate by rANGLE, motion 1 = translate by (rX, rY)
//   convolve00 = 1, convolve01 = 2, (centre 4, shift 3), convolve
//   gen 0 = waveform of size rSIZE, gen 1 = scope, generate
//   gen 0 = circle, gen 1 = disabled, generate
//   rANGLE <= rANGLE + 1; r1 <= (rX < rY); if (r1) skip 1; r3 <= r1 * r2
// Registers the pseudo-code leaves open are set by a short prologue
// (rX = rANGLE & 1, rY = 1, rSIZE = 4, r2 = 3) and the generator colours
// are set so that the patterns show.
// At every buffer flip the testbench compares rANGLE, r1 and r3 with a model
// of the program, with the reset button released on every fourth run. It
// counts and requires: both outcomes of both skips, rotation by a nonzero
// angle, one convolve and two generate sweeps per run, pixels written in the
// waveform/ring colour and in the scope colour, and reads refused while the
// displays use the memory.
module tb_figure1_program;
  import viz_pkg::*;
  localparam int W = 16, H = 8, HA = 8, VA = 8;
  localparam int STRIP = W / 2, SAW = $clog2(2 * STRIP * H);
  localparam int RUNS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sample_valid = 0;
  logic signed [7:0] sample = 0;
  logic imem_we = 0;
  logic [5:0] imem_waddr = 0;
  instr_t imem_wdata = '0;
  logic [7:0] buttons = 8'd1;
  color_t [1:0] vga_rgb;
  logic [1:0] hs_n, vs_n, blank;
  logic [1:0] sram_en, sram_we;
  logic [1:0][SAW-1:0] sram_addr;
  color_t [1:0] sram_wdata, sram_rdata;
  word_t beat_value;
  logic beat, flip;
  logic [5:0] pc;
  always #5 clk = ~clk;

  visualizer_top #(
    .GLOBAL_W(W), .GLOBAL_H(H), .N_SRAM(2), .N_DISP(2), .DEPTH(512), .FFT_N(32),
    .IMEM_DEPTH(64), .NBUTTONS(8), .H_ACTIVE(HA), .H_FP(2), .H_SYNC(2), .H_BP(8),
    .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(140)
  ) dut (
    .clk, .rst, .sample_valid, .sample, .imem_we, .imem_waddr, .imem_wdata, .buttons,
    .vga_rgb, .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .beat_value, .beat, .flip, .pc
  );

  for (genvar s = 0; s < 2; s++) begin : g_sram
    sram_model #(.AW(SAW), .WORDS(2 * STRIP * H)) u_sram (
      .clk, .en(sram_en[s]), .we(sram_we[s]), .addr(sram_addr[s]),
      .wdata(sram_wdata[s]), .rdata(sram_rdata[s])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t I(opcode_e op, alufn_e fn, asel_e a, int wa, int ra, int imm);
    return '{op: op, fn: fn, asel: a, wa: 6'(wa), ra: 6'(ra), imm: 16'(imm)};
  endfunction

  // ------------------------------------------------------------ audio
  int n_samp = 0;
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    if (!rst && ($time / 10) % 4 == 0) begin
      sample_valid <= 1'b1;
      sample <= 8'($rtoi(90.0 * $sin(6.283185307179586 * n_samp / 8.0)));
      n_samp++;
    end
  end

  // ------------------------------------------------------------ model
  // button state of run k (1 = pressed: keep the angle)
  function automatic bit btn(int k);
    return (k % 4) != 0;
  endfunction

  int exp_angle = 0;

  // ------------------------------------------------------------ counters
  int n_flip = 0, n_conv = 0, n_gen = 0, n_refused = 0, n_rot = 0;
  int n_skip1 = 0, n_noskip1 = 0, n_skip2 = 0, n_noskip2 = 0;
  int n_red = 0, n_green = 0;
  logic flip_q = 0;
  always @(posedge clk) if (!rst) begin
    if (flip != flip_q && n_flip < RUNS) begin
      int k, x;
      word_t r1e;
      n_flip++;
      k = n_flip;
      exp_angle = btn(k) ? exp_angle + 1 : 1;
      x = (exp_angle - 1) & 1;                         // rX before the increment
      r1e = (x < 1) ? 16'sd1 : 16'sd0;
      check(dut.u_proc.u_rf.regs[4] == word_t'(exp_angle),
            $sformatf("run %0d: rANGLE %0d, expected %0d", k, dut.u_proc.u_rf.regs[4], exp_angle));
      check(dut.u_proc.u_rf.regs[1] == r1e, $sformatf("run %0d: r1", k));
      check(dut.u_proc.u_rf.regs[3] == 16'sd0, $sformatf("run %0d: r3", k));
      check(n_conv == k && n_gen == 2 * k,
            $sformatf("run %0d: %0d convolve, %0d generate sweeps", k, n_conv, n_gen));
    end
    flip_q <= flip;
    if (dut.u_proc.c_enable) begin
      n_conv++;
      if (dut.u_proc.u_rf.regs[33] != 0) n_rot++;
      buttons <= {7'd0, btn(n_conv + 1)};               // set up the next run
    end
    if (dut.u_proc.g_enable) n_gen++;
    if (dut.u_proc.u_ctl.instr.op == OP_SKIP && dut.u_proc.pcsel) begin
      bit taken;
      taken = dut.u_proc.u_ctl.inc_val != 16'd1;
      if (pc == 6'd1) begin if (taken) n_skip1++; else n_noskip1++; end
      else            begin if (taken) n_skip2++; else n_noskip2++; end
    end
    if (dut.rd_req && !dut.rd_ready) n_refused++;
    for (int s = 0; s < 2; s++) if (sram_en[s] && sram_we[s]) begin
      if (sram_wdata[s] == 12'hF00) n_red++;
      if (sram_wdata[s] == 12'h0F0) n_green++;
    end
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [34];
  initial begin
    // initialize
    prog[0]  = I(OP_ALUI, FN_AND, ASEL_BUTTONS, 10, 0, 1);   // r10 = resetbutton
    prog[1]  = I(OP_SKIP, FN_ADD, ASEL_REG,     0, 10, 1);   // if (resetbutton) skip 1
    prog[2]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,    4, 0, 0);    // rANGLE <= 0
    prog[3]  = I(OP_ALUI, FN_AND, ASEL_REG,     5, 4, 1);    // rX <= rANGLE & 1
    prog[4]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,    6, 0, 1);    // rY <= 1
    prog[5]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,    7, 0, 4);    // rSIZE <= 4
    prog[6]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,    2, 0, 3);    // r2 <= 3
    // configure motion effects
    prog[7]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,   32, 0, 1);    // motion1type <= rotate
    prog[8]  = I(OP_ALUI, FN_ADD, ASEL_REG,    33, 4, 0);    // motion1param1 <= rANGLE
    prog[9]  = I(OP_ALUI, FN_ADD, ASEL_ZERO,   35, 0, 2);    // motion2type <= translate
    prog[10] = I(OP_ALUI, FN_ADD, ASEL_REG,    36, 5, 0);    // motion2param1 <= rX
    prog[11] = I(OP_ALUI, FN_ADD, ASEL_REG,    37, 6, 0);    // motion2param2 <= rY
    // convolution filter
    prog[12] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   48, 0, 1);    // convolve00 <= 1
    prog[13] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   49, 0, 2);    // convolve01 <= 2
    prog[14] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   52, 0, 4);    // centre <= 4
    prog[15] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   47, 0, 3);    // divide by 8
    prog[16] = I(OP_CONV, FN_ADD, ASEL_REG,     0, 0, 0);    // convolve
    // parallel generators
    prog[17] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   38, 0, 1);    // gen1type <= waveform
    prog[18] = I(OP_ALUI, FN_ADD, ASEL_REG,    39, 7, 0);    // gen1param1 <= rSIZE
    prog[19] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   41, 0, 'hF00);
    prog[20] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   42, 0, 2);    // gen2type <= scope
    prog[21] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   43, 0, 7);
    prog[22] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   44, 0, 'h40);
    prog[23] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   45, 0, 'h0F0);
    prog[24] = I(OP_GEN,  FN_ADD, ASEL_REG,     0, 0, 0);    // generate
    prog[25] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   38, 0, 3);    // gen1type <= circle
    prog[26] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   40, 0, 1);
    prog[27] = I(OP_ALUI, FN_ADD, ASEL_ZERO,   42, 0, 0);    // gen2type <= disabled
    prog[28] = I(OP_GEN,  FN_ADD, ASEL_REG,     0, 0, 0);    // generate
    // vary parameters
    prog[29] = I(OP_ALUI, FN_ADD, ASEL_REG,     4, 4, 1);    // rANGLE <= rANGLE + 1
    prog[30] = I(OP_ALU,  FN_SLT, ASEL_REG,     1, 5, 6);    // r1 <= (rX < rY)
    prog[31] = I(OP_SKIP, FN_ADD, ASEL_REG,     0, 1, 1);    // if (r1) skip 1
    prog[32] = I(OP_ALU,  FN_MUL, ASEL_REG,     3, 1, 2);    // r3 <= r1 * r2
    prog[33] = '0;
    for (int i = 0; i < 34; i++) begin
      imem_we = 1; imem_waddr = 6'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    buttons = {7'd0, btn(1)};
    rst = 0;
    wait (n_flip == RUNS);
    repeat (2) @(negedge clk);
    check(n_skip1 >= 1 && n_noskip1 >= 1,
          $sformatf("reset-button skip taken %0d, not taken %0d", n_skip1, n_noskip1));
    check(n_skip2 >= 1 && n_noskip2 >= 1,
          $sformatf("comparison skip taken %0d, not taken %0d", n_skip2, n_noskip2));
    check(n_rot >= 1, $sformatf("%0d sweeps with a nonzero rotation", n_rot));
    check(n_red >= 1 && n_green >= 1,
          $sformatf("pattern pixels written: %0d red, %0d green", n_red, n_green));
    check(n_refused >= 1, $sformatf("%0d effects reads refused for displays", n_refused));
    $display("mechanisms: runs %0d conv %0d gen %0d skip1 %0d/%0d skip2 %0d/%0d rot %0d red %0d green %0d refused %0d",
             n_flip, n_conv, n_gen, n_skip1, n_noskip1, n_skip2, n_noskip2, n_rot, n_red, n_green, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
