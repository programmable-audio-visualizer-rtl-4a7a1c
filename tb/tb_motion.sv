// tb_motion: translate, zoom and rotate vectors against real-arithmetic
// references (rotation within one pixel of rounding).
module tb_motion;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  coord_t x, y, vx, vy;
  motion_cfg_t cfg;

  motion #(.GLOBAL_W(1280), .GLOBAL_H(512)) dut (.x, .y, .cfg, .vx, .vy);

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
    real ang, ex, ey;
    int  rx, ry;
    cfg = '{kind: MOT_NONE, p1: 16'sd0, p2: 16'sd0};
    x = 16'sd10; y = 16'sd20; #1 check(vx == 0 && vy == 0, "none");
    cfg = '{kind: MOT_TRANSLATE, p1: -16'sd7, p2: 16'sd3};
    #1 check(vx == -16'sd7 && vy == 16'sd3, "translate");
    // quarter turn: (x-cx, y-cy) = (100, 0) -> (0, 100)
    cfg = '{kind: MOT_ROTATE, p1: 16'sd64, p2: 16'sd0};
    x = 16'sd740; y = 16'sd256;
    #1 check(vx == -16'sd100 && vy == 16'sd100, $sformatf("rotate 90: %0d %0d", vx, vy));
    for (int i = 0; i < 400; i++) begin
      x  = coord_t'($urandom_range(0, 1279));
      y  = coord_t'($urandom_range(0, 511));
      rx = int'(x) - 640;
      ry = int'(y) - 256;
      if (i % 2 == 0) begin
        cfg = '{kind: MOT_ROTATE, p1: word_t'($urandom_range(0, 255)), p2: 16'sd0};
        ang = 6.283185307179586 * real'(cfg.p1) / 256.0;
        ex = $cos(ang) * rx - $sin(ang) * ry - rx;
        ey = $sin(ang) * rx + $cos(ang) * ry - ry;
        #1;
        check((real'(vx) - ex) < 1.5 && (ex - real'(vx)) < 1.5 &&
              (real'(vy) - ey) < 1.5 && (ey - real'(vy)) < 1.5,
              $sformatf("rotate a=%0d got %0d,%0d exp %f,%f", cfg.p1, vx, vy, ex, ey));
      end else begin
        cfg = '{kind: MOT_ZOOM, p1: word_t'($urandom_range(64, 512)), p2: 16'sd0};
        #1;
        check(int'(vx) == ((rx * int'(cfg.p1)) >>> 8) - rx &&
              int'(vy) == ((ry * int'(cfg.p1)) >>> 8) - ry, "zoom");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
