// tb_instruction_mem: start-up contents are empty words, and written words
// read back one clock after the address.
module tb_instruction_mem;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [7:0] raddr = 0, waddr = 0;
  instr_t rdata, wdata;
  instr_t model [256];
  always #5 clk = ~clk;

  instruction_mem #(.DEPTH(256)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

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
    for (int i = 0; i < 256; i++) model[i] = '0;
    for (int i = 0; i < 16; i++) begin
      raddr = 8'(i * 13);
      @(negedge clk);
      check(rdata == '0, "empty at start-up");
    end
    for (int i = 0; i < 2000; i++) begin
      we    = 1'($urandom);
      waddr = 8'($urandom);
      wdata = instr_t'({$urandom, $urandom});
      raddr = 8'($urandom);
      @(negedge clk);
      check(rdata == model[raddr], "read");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
