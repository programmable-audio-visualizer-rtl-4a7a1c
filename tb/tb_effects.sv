// tb_effects: the effects engine on a 12 x 8 buffer against a behavioural
// frame memory (two-clock reads, random refusals) and reference models:
//   - convolution with random kernels and shifts, with and without a
//     translation motion, compared pixel by pixel with a direct convolution
//     of the front buffer;
//   - generation of a circle and of spectrum bars blended onto the back
//     buffer, compared with the drawing rules evaluated here;
//   - sweep length without refusals: sum over pixels of (taps + 5) clocks
//     for convolution, 6 clocks per pixel for generation.
module tb_effects;
  import viz_pkg::*;
  localparam int W = 12, H = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, c_enable = 0, g_enable = 0, busy;
  fx_params_t p;
  logic rd_req, rd_front, rd_ready, rd_valid, wr_req, wr_ready;
  coord_t rd_x, rd_y, wr_x, wr_y;
  color_t rd_color, wr_color;
  logic [1:0][15:0] sample_age;
  logic [1:0][7:0]  sample;
  logic [1:0][6:0]  bin;
  logic [1:0][15:0] mag;
  color_t front [W][H], back [W][H], expect_b [W][H];
  int refuse_pct = 0;
  always #5 clk = ~clk;

  effects #(.GLOBAL_W(W), .GLOBAL_H(H), .DEPTH(48000), .N_BINS(128)) dut (
    .clk, .rst, .c_enable, .g_enable, .params(p), .busy,
    .rd_req, .rd_front, .rd_x, .rd_y, .rd_ready, .rd_valid, .rd_color,
    .wr_req, .wr_x, .wr_y, .wr_color, .wr_ready,
    .sample_age, .sample, .bin, .mag
  );

  function automatic bit inb(int x, int y);
    return x >= 0 && y >= 0 && x < W && y < H;
  endfunction

  // frame memory stand-in
  logic   v1, v2;
  color_t c1, c2;
  int refusals = 0;
  always @(negedge clk) begin
    rd_ready <= !($urandom_range(0, 99) < refuse_pct);
    wr_ready <= !($urandom_range(0, 99) < refuse_pct);
  end
  always @(posedge clk) if ((rd_req && !rd_ready) || (wr_req && !wr_ready)) refusals++;
  always_ff @(posedge clk) begin
    v1 <= rd_req && rd_ready;
    c1 <= (rd_req && inb(int'(rd_x), int'(rd_y))) ?
          (rd_front ? front[rd_x][rd_y] : back[rd_x][rd_y]) : color_t'(12'd0);
    v2 <= v1;
    c2 <= c1;
    if (wr_req && wr_ready && inb(int'(wr_x), int'(wr_y))) back[wr_x][wr_y] <= wr_color;
  end
  assign rd_valid = v2;
  assign rd_color = c2;

  // audio stand-ins: sample = age / 2, magnitude = 40 * bin
  always_ff @(posedge clk) for (int g = 0; g < 2; g++) begin
    sample[g] <= 8'(sample_age[g] >> 1);
    mag[g]    <= 16'(40 * int'(bin[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int chan(color_t c, int i);
    return (i == 0) ? int'(c.r) : (i == 1) ? int'(c.g) : int'(c.b);
  endfunction

  task automatic run(input bit conv, output int cycles);
    c_enable = conv; g_enable = !conv;
    @(negedge clk);
    c_enable = 0; g_enable = 0;
    cycles = 1;
    while (busy && cycles < 200000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, exp_cycles, s, n, tx, ty, nx, ny, v, d2, bad;
    int ch [3];
    p = '0;
    v1 = 0; v2 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 8; trial++) begin
      refuse_pct = (trial < 2) ? 0 : 30;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
        front[x][y] = color_t'($urandom);
        back[x][y]  = color_t'($urandom);
      end
      // ---- convolution
      p = '0;
      for (int t = 0; t < 9; t++) p.conv_k[t] = ($urandom_range(0, 3) == 0) ? 16'd0 : 16'(int'($urandom_range(0, 8)) - 3);
      if (trial == 0) begin p.conv_k = '0; p.conv_k[4] = 16'd1; end
      p.conv_shift = (trial == 0) ? 4'd0 : 4'($urandom_range(0, 3));
      tx = 0; ty = 0;
      if (trial % 2 == 1) begin
        p.mot[1] = '{kind: MOT_TRANSLATE, p1: 16'sd2, p2: -16'sd1};
        tx = 2; ty = -1;
      end
      exp_cycles = 1;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
        n = 0;
        for (int c = 0; c < 3; c++) ch[c] = 0;
        for (int t = 0; t < 9; t++) begin
          nx = x + tx + t % 3 - 1; ny = y + ty + t / 3 - 1;
          if (p.conv_k[t] != 0 && inb(nx, ny)) begin
            n++;
            for (int c = 0; c < 3; c++) ch[c] += int'($signed(p.conv_k[t])) * chan(front[nx][ny], c);
          end
        end
        for (int c = 0; c < 3; c++) begin
          v = ch[c] >>> p.conv_shift;
          ch[c] = (v < 0) ? 0 : (v > 15) ? 15 : v;
        end
        expect_b[x][y] = '{r: 4'(ch[0]), g: 4'(ch[1]), b: 4'(ch[2])};
        exp_cycles += n + 5;
      end
      run(1'b1, cycles);
      if (trial == 0) for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) expect_b[x][y] = front[x][y];
      bad = 0;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) if (back[x][y] != expect_b[x][y]) bad++;
      check(bad == 0, $sformatf("trial %0d convolution: %0d pixels differ", trial, bad));
      if (refuse_pct == 0) check(cycles == exp_cycles, $sformatf("convolution sweep %0d clocks, expected %0d", cycles, exp_cycles));
      // ---- generators: circle (replace) and spectrum bars (add)
      p.mot = '0;
      p.gen[0] = '{kind: GEN_CIRCLE, p1: 16'sd3, p2: 16'sd1, color: 12'hF00};
      p.gen[1] = '{kind: GEN_SCOPE,  p1: 16'sd6, p2: 16'h0040, color: 12'h0F0};
      p.blend  = (trial % 2 == 0) ? BLEND_REPLACE : BLEND_ADD;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
        color_t c;
        c = back[x][y];
        d2 = (x - W / 2) ** 2 + (y - H / 2) ** 2;
        if (d2 >= 4 && d2 <= 16) c = (p.blend == BLEND_REPLACE) ? color_t'(12'hF00) : sat_add(c, 12'hF00);
        if (y <= 6 && 6 - y < (40 * x) >> 4) c = (p.blend == BLEND_REPLACE) ? color_t'(12'h0F0) : sat_add(c, 12'h0F0);
        expect_b[x][y] = c;
      end
      run(1'b0, cycles);
      bad = 0;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) if (back[x][y] != expect_b[x][y]) bad++;
      check(bad == 0, $sformatf("trial %0d generate: %0d pixels differ", trial, bad));
      if (refuse_pct == 0) check(cycles == 1 + 6 * W * H, $sformatf("generate sweep %0d clocks", cycles));
    end
    check(refusals > 100, $sformatf("%0d refused requests", refusals));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
