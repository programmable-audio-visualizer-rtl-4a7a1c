// tb_control_logic: decoding of each instruction class, the skip distance,
// the wait for frame_sync at the empty word and the hold during a long
// instruction until both the timer and the effects engine are finished.
module tb_control_logic;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  instr_t instr;
  logic z = 0, timer_done = 1, fx_busy = 0, frame_sync = 0;
  logic pcsel, werf, bsel_imm, c_enable, g_enable, timer_start, inc_reset;
  alufn_e alufn;
  asel_e asel_o;
  logic [15:0] inc_val;
  always #50 clk = ~clk;

  control_logic dut (
    .clk, .rst, .instr, .z, .timer_done, .fx_busy, .frame_sync, .pcsel, .werf,
    .alufn, .asel(asel_o), .bsel_imm, .c_enable, .g_enable, .timer_start, .inc_reset, .inc_val
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // ALU immediate
    instr = '{op: OP_ALUI, fn: FN_SUB, asel: ASEL_BEAT, wa: 6'd3, ra: 6'd4, imm: 16'd9};
    #1 check(pcsel && werf && bsel_imm && alufn == FN_SUB && asel_o == ASEL_BEAT &&
             inc_val == 1 && !inc_reset && !c_enable && !g_enable, "alui");
    instr.op = OP_ALU;
    #1 check(pcsel && werf && !bsel_imm, "alu");
    // skip
    instr = '{op: OP_SKIP, fn: FN_ADD, asel: ASEL_REG, wa: 6'd0, ra: 6'd1, imm: 16'd3};
    z = 1; #1 check(pcsel && !werf && inc_val == 1, "skip not taken when A is zero");
    z = 0; #1 check(pcsel && inc_val == 4, "skip 3 taken");
    // end of program waits for the frame
    instr = '0;
    #1 check(!pcsel && inc_reset, "end waits");
    frame_sync = 1; #1 check(pcsel && inc_reset, "end restarts on frame_sync");
    frame_sync = 0;
    // generate: enable pulse, then hold
    for (int m = 0; m < 2; m++) begin
      instr = '{op: (m == 0) ? OP_GEN : OP_CONV, fn: FN_ADD, asel: ASEL_REG, wa: 0, ra: 0, imm: 0};
      timer_done = 0;
      #1 check(timer_start && !pcsel && (m == 0 ? g_enable && !c_enable : c_enable && !g_enable), "launch");
      @(negedge clk);
      fx_busy = 1;
      #1 check(!pcsel && !timer_start && !c_enable && !g_enable, $sformatf("holding m=%0d %b%b%b%b", m, pcsel, timer_start, c_enable, g_enable));
      repeat (3) @(negedge clk);
      timer_done = 1;
      #1 check(!pcsel, "timer done but effects busy");
      @(negedge clk);
      fx_busy = 0;
      #1 check(pcsel && !werf && inc_val == 1, "resume");
      @(negedge clk);
      instr = '{op: OP_ALUI, fn: FN_ADD, asel: ASEL_ZERO, wa: 6'd1, ra: 0, imm: 16'd1};
      #1 check(pcsel && werf, "back to single-clock execution");
    end
    // random single-clock instructions against a reference decode
    for (int i = 0; i < 600; i++) begin
      logic [2:0] op;
      logic e_pcsel, e_werf, e_reset;
      logic [15:0] e_inc;
      do op = 3'($urandom); while (op == 3'(OP_CONV) || op == 3'(OP_GEN));
      instr = instr_t'({op, 33'({$urandom, $urandom})});
      z = 1'($urandom);
      frame_sync = 1'($urandom);
      e_werf  = (op == 3'(OP_ALU)) || (op == 3'(OP_ALUI));
      e_reset = (op == 3'(OP_END));
      e_pcsel = e_reset ? frame_sync : 1'b1;
      e_inc   = (op == 3'(OP_SKIP) && !z) ? 16'(int'(instr.imm) + 1) : 16'd1;
      #1 check(pcsel == e_pcsel && werf == e_werf && inc_reset == e_reset &&
               inc_val == e_inc && bsel_imm == (op == 3'(OP_ALUI)) &&
               alufn == instr.fn && asel_o == instr.asel &&
               !c_enable && !g_enable && !timer_start,
               $sformatf("random decode op=%0d z=%0b", op, z));
      @(negedge clk);
    end
    frame_sync = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
