// tb_blend: each blend mode against a per-channel reference, with random
// colours and random generator coverage.
module tb_blend;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  blend_e       mode;
  color_t       mem, color;
  logic [1:0]   lit;
  color_t [1:0] gen;

  blend #(.N(2)) dut (.mode, .mem, .lit, .gen, .color);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ch(color_t c, int i);
    return (i == 0) ? int'(c.r) : (i == 1) ? int'(c.g) : int'(c.b);
  endfunction

  function automatic int comb(blend_e m, int a, int b);
    case (m)
      BLEND_REPLACE: return b;
      BLEND_ADD:     return (a + b > 15) ? 15 : a + b;
      BLEND_AVERAGE: return (a + b) / 2;
      default:       return (a > b) ? a : b;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    // directed: add saturates, replace puts generator 1 on top
    mode = BLEND_ADD; mem = 12'hF80; lit = 2'b01; gen[0] = 12'h3C3; gen[1] = 12'h000;
    #1 check(color == 12'hFF3, "add saturates");
    mode = BLEND_REPLACE; lit = 2'b11; gen[1] = 12'h123;
    #1 check(color == 12'h123, "replace order");
    lit = 2'b00; #1 check(color == mem, "nothing lit keeps memory");
    for (int i = 0; i < 1000; i++) begin
      mode = blend_e'($urandom_range(0, 3));
      mem  = color_t'($urandom);
      lit  = 2'($urandom);
      gen[0] = color_t'($urandom);
      gen[1] = color_t'($urandom);
      #1;
      for (int c = 0; c < 3; c++) begin
        e = ch(mem, c);
        for (int g = 0; g < 2; g++) if (lit[g]) e = comb(mode, e, ch(gen[g], c));
        check(ch(color, c) == e, $sformatf("mode %0d channel %0d", mode, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
