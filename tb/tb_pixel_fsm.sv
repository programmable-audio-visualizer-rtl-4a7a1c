// tb_pixel_fsm: a 5 x 3 buffer swept in both modes with a timer that takes
// random times and a memory that delays grants. Every pixel must be written
// exactly once, in raster order, after its timer finished; generate mode
// must request each pixel's old value once; busy must cover the sweep.
module tb_pixel_fsm;
  import viz_pkg::*;
  localparam int W = 5, H = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, c_enable = 0, g_enable = 0;
  logic busy, conv_mode, start, timer_done, pix_rd_req, pix_rd_ready, wr_req, wr_ready;
  coord_t x, y;
  int tcount;
  always #5 clk = ~clk;

  pixel_fsm #(.GLOBAL_W(W), .GLOBAL_H(H)) dut (
    .clk, .rst, .c_enable, .g_enable, .busy, .conv_mode, .x, .y, .start, .timer_done,
    .pix_rd_req, .pix_rd_ready, .wr_req, .wr_ready
  );

  // timer stand-in: done a random number of clocks after start, frozen
  // while a pixel read is refused (as the effects timer is)
  always_ff @(posedge clk) begin
    if (rst) tcount <= 0;
    else if (start) tcount <= $urandom_range(1, 6);
    else if (tcount > 0 && !(pix_rd_req && !pix_rd_ready)) tcount <= tcount - 1;
  end
  assign timer_done = (tcount == 0) && !start;

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
    int n_wr, n_rd, n_start, cycles;
    pix_rd_ready = 0; wr_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 6; run++) begin
      bit conv;
      conv = (run % 2 == 0);
      c_enable = conv; g_enable = !conv;
      @(negedge clk);
      c_enable = 0; g_enable = 0;
      check(busy && conv_mode == conv, "sweep started");
      n_wr = 0; n_rd = 0; n_start = 0; cycles = 0;
      while (busy && cycles < 5000) begin
        pix_rd_ready = 1'($urandom);
        wr_ready     = 1'($urandom);
        // a stray enable during the sweep must be ignored
        g_enable = ($urandom_range(0, 50) == 0);
        #1;
        if (start) n_start++;
        if (wr_req) check(tcount == 0, "write after the timer");
        if (wr_req && wr_ready) begin
          check(int'(x) == n_wr % W && int'(y) == n_wr / W, $sformatf("raster order at write %0d", n_wr));
          n_wr++;
        end
        if (pix_rd_req) check(!conv_mode, "no pixel read when convolving");
        if (pix_rd_req && pix_rd_ready) n_rd++;
        @(negedge clk);
        g_enable = 0;
        cycles++;
      end
      check(n_wr == W * H, $sformatf("%0d pixels written", n_wr));
      check(n_start == W * H, "one start per pixel");
      check(n_rd == (conv ? 0 : W * H), $sformatf("%0d pixel reads", n_rd));
      repeat (2) @(negedge clk);
      check(!busy, "idle after the sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
