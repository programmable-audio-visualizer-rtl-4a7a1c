// tb_mult_add: taps issued with random gaps, pixels returned two clocks
// later; the three running sums must equal the kernel-weighted sums computed
// here, and clear must restart them.
module tb_mult_add;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, issue = 0, rd_valid;
  logic [3:0] tap = 0;
  color_t rd_color;
  logic [8:0][15:0] k;
  logic signed [23:0] sum_r, sum_g, sum_b;
  logic   v_pipe [2];
  color_t c_pipe [2];
  always #5 clk = ~clk;

  mult_add #(.LAT(2)) dut (.clk, .rst, .clear, .issue, .tap, .rd_valid, .rd_color, .k, .sum_r, .sum_g, .sum_b);

  // memory stand-in: the pixel for an issued tap arrives two clocks later
  color_t next_color;
  always_ff @(posedge clk) begin
    v_pipe[0] <= issue;
    c_pipe[0] <= next_color;
    v_pipe[1] <= v_pipe[0];
    c_pipe[1] <= c_pipe[0];
  end
  assign rd_valid = v_pipe[1];
  assign rd_color = c_pipe[1];

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
    int er, eg, eb;
    v_pipe = '{0, 0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 300; p++) begin
      for (int t = 0; t < 9; t++) k[t] = 16'(int'($urandom_range(0, 64)) - 32);
      clear = 1; @(negedge clk); clear = 0;
      er = 0; eg = 0; eb = 0;
      for (int t = 0; t < 9; t++) begin
        if ($urandom_range(0, 3) == 0) continue;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        issue = 1; tap = 4'(t); next_color = color_t'($urandom);
        er += int'($signed(k[t])) * int'(next_color.r);
        eg += int'($signed(k[t])) * int'(next_color.g);
        eb += int'($signed(k[t])) * int'(next_color.b);
        @(negedge clk);
        issue = 0;
      end
      repeat (3) @(negedge clk);
      check(int'(sum_r) == er && int'(sum_g) == eg && int'(sum_b) == eb,
            $sformatf("sums %0d %0d %0d expected %0d %0d %0d", sum_r, sum_g, sum_b, er, eg, eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
