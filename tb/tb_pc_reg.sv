// tb_pc_reg: the pc loads next_pc only when pcsel is high, clears on reset,
// and fetch_addr always announces the pc of the next clock.
module tb_pc_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, pcsel = 0;
  logic [9:0] next_pc, pc, fetch_addr, model;
  always #5 clk = ~clk;

  pc_reg #(.AW(10)) dut (.clk, .rst, .pcsel, .next_pc, .pc, .fetch_addr);

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
    logic [9:0] exp_fetch;
    next_pc = 10'd77;
    @(negedge clk); check(fetch_addr == 0, "fetch 0 in reset");
    @(negedge clk); rst = 0; model = 0;
    check(pc == 0, "reset value");
    for (int i = 0; i < 1000; i++) begin
      pcsel   = 1'($urandom);
      next_pc = 10'($urandom);
      #1;
      exp_fetch = pcsel ? next_pc : model;
      check(fetch_addr == exp_fetch, "fetch address");
      @(negedge clk);
      if (pcsel) model = next_pc;
      check(pc == model, $sformatf("pc %0d exp %0d", pc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
