// tb_increment: next_pc = pc + inc_val, reset to 0 on inc_reset, and flip
// toggles exactly on the clocks that take an inc_reset.
module tb_increment;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [9:0] pc, next_pc;
  logic [15:0] inc_val;
  logic inc_reset = 0, advance = 0, flip, model_flip;
  always #5 clk = ~clk;

  increment #(.AW(10)) dut (.clk, .rst, .pc, .inc_val, .inc_reset, .advance, .next_pc, .flip);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int toggles = 0;
    pc = 0; inc_val = 1;
    repeat (2) @(negedge clk);
    rst = 0; model_flip = 0;
    check(flip == 0, "flip after reset");
    for (int i = 0; i < 1000; i++) begin
      pc        = 10'($urandom);
      inc_val   = 16'($urandom_range(1, 20));
      inc_reset = ($urandom_range(0, 5) == 0);
      advance   = 1'($urandom);
      #1;
      check(next_pc == (inc_reset ? 10'd0 : pc + 10'(inc_val)), "next pc");
      @(negedge clk);
      if (inc_reset && advance) begin model_flip = ~model_flip; toggles++; end
      check(flip == model_flip, "flip");
    end
    check(toggles > 10, "flip toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
