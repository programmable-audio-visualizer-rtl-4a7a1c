// tb_display: screen coordinates must map to global ones by the display's
// offset (random positions), and the colour must come back unchanged.
module tb_display;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  coord_t sx, sy, gx, gy, xo, yo;
  logic   sreq, greq;
  color_t scol, gcol;

  display dut (
    .x_off(xo), .y_off(yo),
    .screen_x(sx), .screen_y(sy), .screen_req(sreq), .screen_color(scol),
    .global_x(gx), .global_y(gy), .global_req(greq), .global_color(gcol)
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
    for (int i = 0; i < 300; i++) begin
      sx = coord_t'($urandom_range(0, 639));
      sy = coord_t'($urandom_range(0, 479));
      xo = coord_t'($urandom_range(0, 4095));
      yo = coord_t'($urandom_range(0, 1023));
      sreq = 1'($urandom);
      gcol = color_t'($urandom);
      #1;
      check(gx == coord_t'(int'(sx) + int'(xo)) && gy == coord_t'(int'(sy) + int'(yo)), "offset");
      check(greq == sreq, "request");
      check(scol == gcol, "colour");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
