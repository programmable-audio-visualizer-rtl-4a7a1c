// tb_fft_bram: written magnitudes read back on every port one clock later.
module tb_fft_bram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [6:0] waddr;
  logic [15:0] wdata;
  logic [2:0][6:0] raddr;
  logic [2:0][15:0] rdata;
  logic [15:0] model [128];
  always #5 clk = ~clk;

  fft_bram #(.N_BINS(128), .N_RD(3)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

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
    for (int i = 0; i < 128; i++) begin
      we = 1; waddr = 7'(i); wdata = 16'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 7'($urandom); wdata = 16'($urandom);
      for (int p = 0; p < 3; p++) raddr[p] = 7'($urandom);
      @(negedge clk);
      for (int p = 0; p < 3; p++) check(rdata[p] == model[raddr[p]], "read");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
