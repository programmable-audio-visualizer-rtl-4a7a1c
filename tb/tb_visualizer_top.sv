// tb_visualizer_top: end-to-end run of the whole visualizer on a reduced
// configuration (16 x 8 virtual buffer shown on two 8 x 8 screens, 32-point
// spectrum, 512-sample audio buffer, short frames). A program is loaded
// through the instruction-memory port and runs once per frame:
//   count frames in r1, read the beat into r2,
//   translate by (+1, 0) and convolve with the identity kernel, so the back
//   buffer becomes the previous frame moved one pixel left,
//   draw a red ring of radius (frame & 3) + 1 about the buffer centre and,
//   only when a beat was seen (skip otherwise), a green disc on top of it,
//   generate, end.
// Audio is a tone whose loudness rises every fourth frame, so beats occur.
// The testbench keeps its own model of every frame, captures both screens
// from the VGA outputs and compares each displayed frame with the model of
// the buffer last flipped to the front. It counts the mechanisms the design
// has and fails any that never happened: buffer flips, FFT passes, beats,
// convolution and generate sweeps, skips taken and not taken, and effects
// memory requests refused because a display was reading.
module tb_visualizer_top;
  import viz_pkg::*;
  localparam int W = 16, H = 8, HA = 8, VA = 8;
  localparam int STRIP = W / 2, SAW = $clog2(2 * STRIP * H);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sample_valid = 0;
  logic signed [7:0] sample = 0;
  logic imem_we = 0;
  logic [5:0] imem_waddr = 0;
  instr_t imem_wdata = '0;
  logic [7:0] buttons = 0;
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
  int frame_no = 0, n_samp = 0;
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    if (!rst && ($time / 10) % 4 == 0) begin
      real amp;
      amp = (frame_no % 4 == 3) ? 110.0 : 15.0;
      sample_valid <= 1'b1;
      sample <= 8'($rtoi(amp * $sin(6.283185307179586 * n_samp / 16.0)));
      n_samp++;
    end
  end

  // ------------------------------------------------------------ model
  color_t model [64][W][H];   // model[k]: buffer contents after run k
  bit     beat_seen [64];
  int     runs_modeled = 0;

  task automatic model_run(input int k, input bit with_beat);
    int r, d2;
    r = (k & 3) + 1;
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
      color_t c;
      c = (k > 1 && x + 1 < W) ? model[k - 1][x + 1][y] : color_t'(12'd0);
      d2 = (x - W / 2) ** 2 + (y - H / 2) ** 2;
      if (d2 == r * r) c = 12'hF00;
      if (with_beat && d2 >= 1 && d2 <= 9) c = 12'h0F0;
      model[k][x][y] = c;
    end
  endtask

  // ------------------------------------------------------------ counters
  int n_flip = 0, n_fft = 0, n_beat = 0, n_conv = 0, n_gen = 0, n_skip = 0, n_noskip = 0;
  int n_refused = 0, n_frames_checked = 0;
  logic flip_q = 0, beat_q = 0;
  always @(posedge clk) if (!rst) begin
    if (flip != flip_q) begin
      // the run that starts at this flip reads the beat value of this moment
      n_flip++;
      beat_seen[n_flip + 1] = (beat_value != 0);
    end
    flip_q <= flip;
    if (beat && !beat_q) n_beat++;
    beat_q <= beat;
    if (dut.u_fft.done) n_fft++;
    if (dut.u_proc.c_enable) n_conv++;
    if (dut.u_proc.g_enable) n_gen++;
    if (dut.u_proc.u_ctl.instr.op == OP_SKIP && dut.u_proc.pcsel)
      if (dut.u_proc.u_ctl.inc_val != 16'd1) n_skip++; else n_noskip++;
    if (dut.rd_req && !dut.rd_ready) n_refused++;
  end

  // ------------------------------------------------------------ capture
  color_t shown [W][H];
  int     pix_cnt [2];
  int     shown_run;
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < 2; d++) if (!blank[d]) begin
      int k;
      k = pix_cnt[d];
      if (d == 0 && k == 0) shown_run = n_flip;   // front buffer holds run n_flip
      shown[d * HA + k % HA][k / HA] = vga_rgb[d];
      pix_cnt[d] = (k + 1) % (HA * VA);
      if (d == 1 && k == HA * VA - 1) begin
        int bad;
        bad = 0;
        for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
          color_t e;
          e = (shown_run == 0) ? color_t'(12'd0) : model[shown_run][x][y];
          if (shown[x][y] != e) bad++;
        end
        check(bad == 0, $sformatf("frame showing run %0d: %0d pixels differ", shown_run, bad));
        n_frames_checked++;
        frame_no++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [20];
  initial begin
    pix_cnt = '{0, 0};
    beat_seen[1] = 0;
    prog[0]  = I(OP_ALUI, FN_ADD, ASEL_REG,  1, 1, 1);
    prog[1]  = I(OP_ALUI, FN_ADD, ASEL_BEAT, 2, 0, 0);
    prog[2]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 32, 0, 2);       // motion 0: translate
    prog[3]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 33, 0, 1);
    prog[4]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 34, 0, 0);
    prog[5]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 52, 0, 1);       // centre tap = 1
    prog[6]  = I(OP_CONV, FN_ADD, ASEL_REG,  0, 0, 0);
    prog[7]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 32, 0, 0);       // motion off
    prog[8]  = I(OP_ALUI, FN_AND, ASEL_REG,  3, 1, 3);
    prog[9]  = I(OP_ALUI, FN_ADD, ASEL_REG, 39, 3, 1);        // ring radius
    prog[10] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 38, 0, 3);       // generator 0: circle
    prog[11] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 41, 0, 'hF00);
    prog[12] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 42, 0, 3);       // generator 1: disc
    prog[13] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 43, 0, 2);
    prog[14] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 44, 0, 1);
    prog[15] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 45, 0, 'h0F0);
    prog[16] = I(OP_SKIP, FN_ADD, ASEL_REG,  0, 2, 1);        // if (beat) skip 1
    prog[17] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 42, 0, 0);       // no beat: disc off
    prog[18] = I(OP_GEN,  FN_ADD, ASEL_REG,  0, 0, 0);
    prog[19] = '0;
    for (int i = 0; i < 20; i++) begin
      imem_we = 1; imem_waddr = 6'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    rst = 0;
    // build the model run by run as the flips reveal the beat each run saw
    while (n_frames_checked < 40) begin
      @(negedge clk);
      while (runs_modeled < n_flip + 1 && runs_modeled < 62) begin
        runs_modeled++;
        model_run(runs_modeled, beat_seen[runs_modeled]);
      end
    end
    check(n_flip >= 10, $sformatf("%0d buffer flips", n_flip));
    check(n_fft >= 10, $sformatf("%0d FFT passes", n_fft));
    check(n_beat >= 2, $sformatf("%0d beats", n_beat));
    check(n_conv >= 10 && n_gen >= 10, $sformatf("%0d convolve, %0d generate sweeps", n_conv, n_gen));
    check(n_skip >= 1 && n_noskip >= 1, $sformatf("skips taken %0d, not taken %0d", n_skip, n_noskip));
    check(n_refused >= 1, $sformatf("%0d effects requests refused for displays", n_refused));
    $display("mechanisms: flips %0d fft %0d beats %0d conv %0d gen %0d skip %0d/%0d refused %0d frames %0d",
             n_flip, n_fft, n_beat, n_conv, n_gen, n_skip, n_noskip, n_refused, n_frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
