// tb_memory_manager: two displays and random effects traffic on a 16 x 8
// double buffer in two SRAM models. A reference copy of both buffers checks
// every display colour and effects read; the grants are checked against the
// priority rule (displays, then effects read, then effects write, one access
// per SRAM per clock); collisions, out-of-range accesses and buffer flips
// are all exercised and counted.
module tb_memory_manager;
  import viz_pkg::*;
  localparam int W = 16, H = 8, NS = 2, ND = 2, SW = W / NS, AW = $clog2(2 * SW * H);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, flip = 0;
  logic   [ND-1:0] disp_req;
  coord_t [ND-1:0] disp_x, disp_y;
  color_t [ND-1:0] disp_color;
  logic fx_rd_req = 0, fx_rd_front = 0, fx_rd_ready, fx_rd_valid;
  coord_t fx_rd_x, fx_rd_y, fx_wr_x, fx_wr_y;
  color_t fx_rd_color, fx_wr_color;
  logic fx_wr_req = 0, fx_wr_ready;
  logic   [NS-1:0] sram_en, sram_we;
  logic   [NS-1:0][AW-1:0] sram_addr;
  color_t [NS-1:0] sram_wdata, sram_rdata;
  color_t ref_buf [2][W][H];
  always #5 clk = ~clk;

  memory_manager #(.GLOBAL_W(W), .GLOBAL_H(H), .N_SRAM(NS), .N_DISP(ND)) dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_sram
    sram_model #(.AW(AW), .WORDS(2 * SW * H)) u_sram (
      .clk, .en(sram_en[s]), .we(sram_we[s]), .addr(sram_addr[s]),
      .wdata(sram_wdata[s]), .rdata(sram_rdata[s])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit inb(coord_t x, coord_t y);
    return x >= 0 && y >= 0 && x < coord_t'(W) && y < coord_t'(H);
  endfunction
  function automatic int strip(coord_t x);
    return int'(x) / SW;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    color_t exp_d [3][ND];
    bit     exp_dv [3][ND];
    color_t exp_r [3];
    bit     exp_rv [3];
    int collisions = 0, fx_waits = 0, writes = 0, reads = 0, flips = 0, oob = 0;
    bit busy [NS];
    for (int b = 0; b < 2; b++) for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) ref_buf[b][x][y] = '0;
    for (int i = 0; i < 3; i++) begin exp_dv[i] = '{0, 0}; exp_rv[i] = 0; end
    disp_req = '0; disp_x = '0; disp_y = '0;
    fx_rd_x = 0; fx_rd_y = 0; fx_wr_x = 0; fx_wr_y = 0; fx_wr_color = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 20000; c++) begin
      // stimulus
      if (c % 1500 == 1499) begin flip = ~flip; flips++; end
      for (int d = 0; d < ND; d++) begin
        disp_req[d] = ($urandom_range(0, 3) != 0);
        // mostly inside the display's own strip, sometimes anywhere
        disp_x[d] = coord_t'(($urandom_range(0, 9) == 0) ? $urandom_range(0, W - 1)
                                                          : d * SW + $urandom_range(0, SW - 1));
        disp_y[d] = coord_t'($urandom_range(0, H - 1));
      end
      fx_rd_req   = 1'($urandom);
      fx_rd_front = 1'($urandom);
      fx_rd_x = coord_t'(int'($urandom_range(0, W + 1)) - 1);
      fx_rd_y = coord_t'($urandom_range(0, H - 1));
      fx_wr_req = 1'($urandom);
      fx_wr_x = coord_t'($urandom_range(0, W - 1));
      fx_wr_y = coord_t'(int'($urandom_range(0, H)) );
      fx_wr_color = color_t'($urandom);
      #1;
      // grants against the priority rule
      busy = '{0, 0};
      for (int d = 0; d < ND; d++) begin
        exp_dv[0][d] = 0;
        if (disp_req[d] && inb(disp_x[d], disp_y[d])) begin
          if (busy[strip(disp_x[d])]) collisions++;
          else begin
            busy[strip(disp_x[d])] = 1;
            exp_dv[0][d] = 1;
            exp_d[0][d] = ref_buf[flip][disp_x[d]][disp_y[d]];
          end
        end
      end
      exp_rv[0] = 0;
      if (fx_rd_req) begin
        if (!inb(fx_rd_x, fx_rd_y)) begin
          check(fx_rd_ready, "out-of-range read granted"); oob++;
          exp_rv[0] = 1; exp_r[0] = '0;
        end else begin
          check(fx_rd_ready == !busy[strip(fx_rd_x)], "read grant");
          if (fx_rd_ready) begin
            busy[strip(fx_rd_x)] = 1;
            exp_rv[0] = 1;
            exp_r[0] = ref_buf[fx_rd_front ? flip : !flip][fx_rd_x][fx_rd_y];
            reads++;
          end else fx_waits++;
        end
      end
      if (fx_wr_req) begin
        if (!inb(fx_wr_x, fx_wr_y)) begin check(fx_wr_ready, "out-of-range write dropped"); oob++; end
        else begin
          check(fx_wr_ready == !busy[strip(fx_wr_x)], "write grant");
          if (fx_wr_ready) begin writes++; ref_buf[!flip][fx_wr_x][fx_wr_y] = fx_wr_color; end
          else fx_waits++;
        end
      end
      // results of the requests two clocks ago
      for (int d = 0; d < ND; d++)
        check(disp_color[d] == (exp_dv[2][d] ? exp_d[2][d] : color_t'(12'd0)), $sformatf("display %0d colour", d));
      check(fx_rd_valid == exp_rv[2], "read valid");
      if (exp_rv[2]) check(fx_rd_color == exp_r[2], "read colour");
      @(negedge clk);
      exp_d[2] = exp_d[1]; exp_dv[2] = exp_dv[1]; exp_r[2] = exp_r[1]; exp_rv[2] = exp_rv[1];
      exp_d[1] = exp_d[0]; exp_dv[1] = exp_dv[0]; exp_r[1] = exp_r[0]; exp_rv[1] = exp_rv[0];
    end
    check(collisions > 10 && fx_waits > 100 && writes > 1000 && reads > 1000 && flips > 5 && oob > 100,
          $sformatf("coverage: coll %0d waits %0d wr %0d rd %0d flips %0d oob %0d",
                    collisions, fx_waits, writes, reads, flips, oob));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
