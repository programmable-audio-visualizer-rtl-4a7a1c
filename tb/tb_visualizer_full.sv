// tb_visualizer_full: one complete frame operation of the visualizer at its
// default size: two 640x480 screens on a 1280x512 virtual buffer held in two
// SRAM models, 48 000-sample audio buffer, 256-point spectrum.
// The front buffer starts with a test pattern. The program moves the picture
// one pixel left (translate motion plus identity convolution over all
// 655 360 pixels), draws a red ring of radius 100 about the buffer centre,
// and ends. The testbench checks that both screens show the pattern before
// the flip and the moved pattern with the ring after it, pixel for pixel.
module tb_visualizer_full;
  import viz_pkg::*;
  localparam int W = 1280, H = 512, HA = 640, VA = 480;
  localparam int SAW = $clog2(2 * 640 * 512);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sample_valid = 0;
  logic signed [7:0] sample = 0;
  logic imem_we = 0;
  logic [9:0] imem_waddr = 0;
  instr_t imem_wdata = '0;
  logic [7:0] buttons = 0;
  color_t [1:0] vga_rgb;
  logic [1:0] hs_n, vs_n, blank;
  logic [1:0] sram_en, sram_we;
  logic [1:0][SAW-1:0] sram_addr;
  color_t [1:0] sram_wdata, sram_rdata;
  word_t beat_value;
  logic beat, flip;
  logic [9:0] pc;
  always #5 clk = ~clk;

  visualizer_top dut (
    .clk, .rst, .sample_valid, .sample, .imem_we, .imem_waddr, .imem_wdata, .buttons,
    .vga_rgb, .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .beat_value, .beat, .flip, .pc
  );

  for (genvar s = 0; s < 2; s++) begin : g_sram
    sram_model #(.AW(SAW), .WORDS(2 * 640 * 512)) u_sram (
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

  function automatic color_t pattern(int x, int y);
    return color_t'(12'(x * 7 + y * 3));
  endfunction

  function automatic color_t after(int x, int y);
    int d2;
    d2 = (x - W / 2) ** 2 + (y - H / 2) ** 2;
    if (d2 >= 97 * 97 && d2 <= 103 * 103) return 12'hF00;
    return (x + 1 < W) ? pattern(x + 1, y) : color_t'(12'd0);
  endfunction

  // audio: a steady tone, one sample every 4 clocks
  int n_samp = 0;
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    if (!rst && ($time / 10) % 4 == 0) begin
      sample_valid <= 1'b1;
      sample <= 8'($rtoi(50.0 * $sin(6.283185307179586 * n_samp / 32.0)));
      n_samp++;
    end
  end

  // capture: compare each displayed frame as it is scanned out
  int pix_cnt [2] = '{0, 0};
  int bad [2] = '{0, 0};
  int frames_before = 0, frames_after = 0, n_flip = 0;
  logic flip_q = 0;
  bit after_frame [2];
  always @(posedge clk) if (!rst) begin
    if (flip != flip_q) n_flip++;
    flip_q <= flip;
    for (int d = 0; d < 2; d++) if (!blank[d]) begin
      int k, x, y;
      color_t e;
      k = pix_cnt[d];
      if (k == 0) begin after_frame[d] = (n_flip > 0); bad[d] = 0; end
      x = d * HA + k % HA;
      y = k / HA;
      e = after_frame[d] ? after(x, y) : pattern(x, y);
      if (vga_rgb[d] != e) bad[d]++;
      pix_cnt[d] = (k + 1) % (HA * VA);
      if (k == HA * VA - 1) begin
        check(bad[d] == 0, $sformatf("display %0d frame (%s flip): %0d pixels differ",
                                     d, after_frame[d] ? "after" : "before", bad[d]));
        if (d == 1) begin
          if (after_frame[d]) frames_after++; else frames_before++;
        end
      end
    end
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [12];
  initial begin
    // front buffer (buffer 0) starts with the test pattern
    for (int s = 0; s < 2; s++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < 640; x++) begin
          if (s == 0) g_sram[0].u_sram.mem[y * 640 + x] = pattern(x, y);
          else        g_sram[1].u_sram.mem[y * 640 + x] = pattern(640 + x, y);
        end
    prog[0]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 32, 0, 2);       // translate (+1, 0)
    prog[1]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 33, 0, 1);
    prog[2]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 52, 0, 1);       // identity kernel
    prog[3]  = I(OP_CONV, FN_ADD, ASEL_REG,  0, 0, 0);
    prog[4]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 32, 0, 0);       // motion off
    prog[5]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 38, 0, 3);       // ring
    prog[6]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 39, 0, 100);
    prog[7]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 40, 0, 3);
    prog[8]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 41, 0, 'hF00);
    prog[9]  = I(OP_GEN,  FN_ADD, ASEL_REG,  0, 0, 0);
    prog[10] = '0;
    for (int i = 0; i < 11; i++) begin
      imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    rst = 0;
    wait (frames_after >= 1);
    check(frames_before >= 1, $sformatf("%0d frames shown before the flip", frames_before));
    check(n_flip == 1, "one flip");
    $display("frames before %0d after %0d, flips %0d, at %0t", frames_before, frames_after, n_flip, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
