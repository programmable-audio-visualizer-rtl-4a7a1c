// tb_timer: done rises exactly value enabled clocks after start, stays low
// while counting, and a zero value is done at once.
module tb_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, en = 1, done;
  logic [31:0] value;
  always #5 clk = ~clk;

  timer #(.W(32)) dut (.clk, .rst, .start, .value, .en, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, counted;
    repeat (2) @(negedge clk);
    rst = 0;
    check(done, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      v = $urandom_range(0, 40);
      value = 32'(v); start = 1; en = 1;
      #1 check(!done, "not done while start is applied");
      @(negedge clk); start = 0; #1;
      counted = 0;
      while (!done) begin
        en = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (en) counted++;
        if (counted > 100) break;
      end
      check(counted == v, $sformatf("counted %0d enabled clocks for value %0d", counted, v));
      en = 1;
      @(negedge clk);
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
