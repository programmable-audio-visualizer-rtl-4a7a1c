// tb_processor: loads a program exercising every instruction class and runs
// it for several frames against a stand-in effects engine that stays busy
// for a random time. The program stores its results in configuration
// registers, read here through the fixed ports: arithmetic, a taken and a
// not-taken skip, the beat and button inputs, a frame counter. Also checked:
// one convolve and one generate launch per frame, pc held while they run and
// for at least the time_logic budget, a flip per frame, and the wait at the
// empty word for frame_sync.
module tb_processor;
  import viz_pkg::*;
  localparam int PIX = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, imem_we = 0, frame_sync = 0, fx_busy, c_enable, g_enable, flip;
  logic [9:0] imem_waddr = 0, pc;
  instr_t imem_wdata;
  word_t beat = 16'sd1234;
  logic [7:0] buttons = 8'h5A;
  fx_params_t fx;
  int fx_left;
  always #5 clk = ~clk;

  processor #(.IMEM_DEPTH(1024), .PIXELS(PIX), .NBUTTONS(8)) dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .beat, .buttons, .frame_sync,
    .fx_busy, .c_enable, .g_enable, .fx_params(fx), .flip, .pc
  );

  // effects stand-in
  always_ff @(posedge clk) begin
    if (rst) fx_left <= 0;
    else if (c_enable || g_enable) fx_left <= $urandom_range(5, 120);
    else if (fx_left > 0) fx_left <= fx_left - 1;
  end
  assign fx_busy = (fx_left != 0);

  function automatic instr_t I(opcode_e op, alufn_e fn, asel_e a, int wa, int ra, int imm);
    return '{op: op, fn: fn, asel: a, wa: 6'(wa), ra: 6'(ra), imm: 16'(imm)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [17];
  initial begin
    int n_c, n_g, hold, frames;
    logic [9:0] held_pc;
    bit last_flip;
    prog[0]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 1, 0, 5);
    prog[1]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 2, 0, -3);
    prog[2]  = I(OP_ALU,  FN_MUL, ASEL_REG,  3, 1, 2);
    prog[3]  = I(OP_ALU,  FN_ADD, ASEL_REG, 48, 3, 0);
    prog[4]  = I(OP_ALU,  FN_SLT, ASEL_REG,  4, 2, 1);
    prog[5]  = I(OP_SKIP, FN_ADD, ASEL_REG,  0, 4, 1);
    prog[6]  = I(OP_ALUI, FN_ADD, ASEL_ZERO, 49, 0, 111);
    prog[7]  = I(OP_ALUI, FN_ADD, ASEL_BEAT, 50, 0, 0);
    prog[8]  = I(OP_ALUI, FN_ADD, ASEL_BUTTONS, 51, 0, 0);
    prog[9]  = I(OP_SKIP, FN_ADD, ASEL_REG,  0, 0, 1);
    prog[10] = I(OP_ALUI, FN_ADD, ASEL_ZERO, 52, 0, 7);
    prog[11] = I(OP_ALUI, FN_ADD, ASEL_REG,  5, 5, 1);
    prog[12] = I(OP_ALU,  FN_ADD, ASEL_REG, 53, 5, 0);
    prog[13] = I(OP_CONV, FN_ADD, ASEL_REG,  0, 0, 0);
    prog[14] = I(OP_GEN,  FN_ADD, ASEL_REG,  0, 0, 0);
    prog[15] = I(OP_ALUI, FN_XOR, ASEL_REG, 54, 1, 15);
    prog[16] = '0;
    // load the program while held in reset
    for (int i = 0; i < 17; i++) begin
      imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    rst = 0;
    last_flip = flip;
    check(flip == 0, "flip after reset");
    for (frames = 1; frames <= 5; frames++) begin
      n_c = 0; n_g = 0;
      // run until the program waits at its empty word
      for (int c = 0; c < 2000; c++) begin
        @(negedge clk);
        if (c_enable) begin n_c++; held_pc = pc; hold = 0; end
        if (g_enable) begin n_g++; held_pc = pc; hold = 0; end
        if (fx_busy) check(pc == held_pc, "pc held while effects run");
        hold++;
        if (pc == 10'd16 && n_g == 1) break;
      end
      check(n_c == 1 && n_g == 1, $sformatf("frame %0d launches conv %0d gen %0d", frames, n_c, n_g));
      check(hold >= PIX * 6, $sformatf("generate held %0d clocks", hold));
      repeat (20) @(negedge clk);
      check(pc == 10'd16 && flip == last_flip, "waiting for the frame");
      check(fx.conv_k[0] == 16'hFFF1, "5 * -3");
      check(fx.conv_k[1] == 16'd0, "skip taken");
      check(fx.conv_k[2] == 16'd1234, "beat operand");
      check(fx.conv_k[3] == 16'h005A, "buttons operand");
      check(fx.conv_k[4] == 16'd7, "skip not taken");
      check(fx.conv_k[5] == 16'(frames), "frame counter");
      check(fx.conv_k[6] == 16'd10, "xor immediate");
      frame_sync = 1;
      @(negedge clk);
      frame_sync = 0;
      check(pc == 10'd0 && flip != last_flip, "restart and flip");
      last_flip = flip;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
