// tb_effects_time_logic: per-pixel budget = taps inside the buffer with a
// nonzero coefficient + 2 for convolution, 3 for generation.
module tb_effects_time_logic;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic conv_mode;
  logic [8:0][15:0] k;
  coord_t x, y;
  logic [8:0] tap_mask;
  logic [31:0] value;

  effects_time_logic #(.GLOBAL_W(32), .GLOBAL_H(16), .RD_LAT(2)) dut (
    .conv_mode, .conv_k(k), .x, .y, .tap_mask, .value
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, nx, ny;
    for (int t = 0; t < 9; t++) k[t] = 16'd1;
    conv_mode = 1'b1;
    x = 0; y = 0;  #1 check(value == 32'd6, "corner: 4 taps");
    x = 5; y = 5;  #1 check(value == 32'd11, "inside: 9 taps");
    x = 31; y = 7; #1 check(value == 32'd8, "right edge: 6 taps");
    conv_mode = 1'b0; #1 check(value == 32'd3, "generate");
    conv_mode = 1'b1;
    for (int i = 0; i < 500; i++) begin
      for (int t = 0; t < 9; t++) k[t] = ($urandom_range(0, 2) == 0) ? 16'd0 : 16'($urandom);
      x = coord_t'(int'($urandom_range(0, 40)) - 4);
      y = coord_t'(int'($urandom_range(0, 24)) - 4);
      #1;
      n = 0;
      for (int t = 0; t < 9; t++) begin
        nx = int'(x) + t % 3 - 1;
        ny = int'(y) + t / 3 - 1;
        if (k[t] != 0 && nx >= 0 && ny >= 0 && nx < 32 && ny < 16) n++;
      end
      check(value == 32'(n + 2), "random tap count");
      check($countones(tap_mask) == n, "mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
