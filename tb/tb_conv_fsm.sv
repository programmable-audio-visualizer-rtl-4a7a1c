// tb_conv_fsm: for random tap masks and a memory port that refuses requests
// at random, every masked tap must be requested exactly once, lowest first,
// at the right neighbour coordinates, and reported to the accumulator only
// when granted; the output colour is the clamped, shifted sum.
module tb_conv_fsm;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, rd_req, rd_ready = 0, issue, busy;
  logic [8:0] tap_mask;
  coord_t x, y, rd_x, rd_y;
  logic [3:0] tap, shift;
  logic signed [23:0] sum_r, sum_g, sum_b;
  color_t color;
  always #5 clk = ~clk;

  conv_fsm dut (.clk, .rst, .start, .tap_mask, .x, .y, .rd_req, .rd_x, .rd_y, .rd_ready,
                .issue, .tap, .busy, .sum_r, .sum_g, .sum_b, .shift, .color);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int clampc(int s, int sh);
    int v;
    v = s >>> sh;
    return (v < 0) ? 0 : (v > 15) ? 15 : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_t, refused = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 500; p++) begin
      x = coord_t'($urandom_range(0, 100));
      y = coord_t'($urandom_range(0, 100));
      tap_mask = 9'($urandom);
      start = 1; @(negedge clk); start = 0;
      for (int t = 0; t < 9; t++) begin
        if (!tap_mask[t]) continue;
        forever begin
          rd_ready = ($urandom_range(0, 2) != 0);
          #1;
          check(rd_req && busy && tap == 4'(t), $sformatf("tap %0d expected, got %0d", t, tap));
          check(rd_x == x + coord_t'(t % 3 - 1) && rd_y == y + coord_t'(t / 3 - 1), "neighbour");
          check(issue == rd_ready, "issue only when granted");
          @(negedge clk);
          if (rd_ready) break;
          refused++;
        end
      end
      rd_ready = 0;
      #1 check(!rd_req && !busy, "done");
      sum_r = 24'($urandom_range(0, 4000)) - 24'sd1000;
      sum_g = 24'($urandom_range(0, 400));
      sum_b = -24'sd5;
      shift = 4'($urandom_range(0, 6));
      #1 check(int'(color.r) == clampc(int'(sum_r), int'(shift)) &&
               int'(color.g) == clampc(int'(sum_g), int'(shift)) && color.b == 0, "normalised colour");
      @(negedge clk);
    end
    check(refused > 100, "refusals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
