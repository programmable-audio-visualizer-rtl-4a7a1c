// tb_translate: the translated coordinates must equal the pixel coordinates
// plus the sum of all motion vectors.
module tb_translate;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  coord_t x, y, xt, yt;
  coord_t [2:0] vx, vy;

  translate #(.N(3)) dut (.x, .y, .vx, .vy, .xt, .yt);

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
    for (int i = 0; i < 500; i++) begin
      x = coord_t'($urandom_range(0, 1279));
      y = coord_t'($urandom_range(0, 511));
      for (int k = 0; k < 3; k++) begin
        vx[k] = coord_t'(int'($urandom_range(0, 200)) - 100);
        vy[k] = coord_t'(int'($urandom_range(0, 200)) - 100);
      end
      #1;
      check(int'(xt) == int'(x) + int'(vx[0]) + int'(vx[1]) + int'(vx[2]), "xt");
      check(int'(yt) == int'(y) + int'(vy[0]) + int'(vy[1]) + int'(vy[2]), "yt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
