// tb_xvga: a small screen mode; the testbench answers each pixel request
// with a colour derived from its coordinates after LAT clocks and checks
// that the output shows it with correctly aligned syncs and blanking, and
// that frame_end comes once per frame of H_TOTAL * V_TOTAL clocks.
module tb_xvga;
  import viz_pkg::*;
  localparam int HA = 8, HF = 2, HS = 3, HB = 2, VA = 4, VF = 1, VS = 2, VB = 1, LAT = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  coord_t hcount, vcount;
  logic req, hs_n, vs_n, blank, frame_end;
  color_t color, rgb;
  color_t pipe [LAT];
  int     hpipe [LAT], vpipe [LAT];
  always #5 clk = ~clk;

  xvga #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
         .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .LAT(LAT)) dut (
    .clk, .rst, .hcount, .vcount, .req, .color, .vga_rgb(rgb),
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank), .frame_end
  );

  // memory stand-in: colour = f(x, y), LAT clocks late
  always_ff @(posedge clk) begin
    pipe[0]  <= color_t'(12'(int'(hcount) * 16 + int'(vcount)));
    hpipe[0] <= int'(hcount);
    vpipe[0] <= int'(vcount);
    for (int i = 1; i < LAT; i++) begin
      pipe[i] <= pipe[i-1]; hpipe[i] <= hpipe[i-1]; vpipe[i] <= vpipe[i-1];
    end
  end
  assign color = pipe[LAT-1];

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
    int h, v, frames = 0, last_end = -1, cyc = 0;
    bit act;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (LAT + 1) begin @(negedge clk); cyc++; end
    repeat (3 * HT * VT) begin
      h = hpipe[LAT-1]; v = vpipe[LAT-1];
      act = (h < HA) && (v < VA);
      check(blank == !act, "blank");
      check(rgb == (act ? color_t'(12'(h * 16 + v)) : color_t'(12'd0)), "pixel");
      check(hs_n == !(h >= HA + HF && h < HA + HF + HS), "hsync");
      check(vs_n == !(v >= VA + VF && v < VA + VF + VS), "vsync");
      check(req == (hcount < coord_t'(HA) && vcount < coord_t'(VA)), "request");
      if (frame_end) begin
        check(hcount == 0 && vcount == coord_t'(VA), "frame_end position");
        if (last_end >= 0) check(cyc - last_end == HT * VT, "frame length");
        last_end = cyc;
        frames++;
      end
      @(negedge clk); cyc++;
    end
    check(frames >= 2, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
