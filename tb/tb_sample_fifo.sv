// tb_sample_fifo: ages address the newest samples, the buffer wraps after
// DEPTH samples, unwritten ages read 0, and all ports read independently.
module tb_sample_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0] in_sample;
  logic [2:0][9:0] rd_age;
  logic [2:0][7:0] rd_data;
  logic [7:0] hist [4000];
  int nh = 0;
  always #5 clk = ~clk;

  sample_fifo #(.DEPTH(1000), .N_RD(3)) dut (.clk, .rst, .in_valid, .in_sample, .rd_age, .rd_data);

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
    logic [7:0] e;
    rd_age = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2600; i++) begin
      in_valid  = ($urandom_range(0, 2) != 0);
      in_sample = 8'($urandom);
      for (int p = 0; p < 3; p++) rd_age[p] = 10'($urandom_range(0, 999));
      @(negedge clk);
      // data read this clock refers to the contents before the write
      for (int p = 0; p < 3; p++) begin
        e = (int'(rd_age[p]) < nh && int'(rd_age[p]) < 1000) ? hist[nh - 1 - int'(rd_age[p])] : 8'd0;
        check(rd_data[p] == e, $sformatf("port %0d age %0d", p, rd_age[p]));
      end
      if (in_valid) begin
        hist[nh] = in_sample;
        nh++;
      end
    end
    check(nh > 1200, "buffer filled and wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
