// tb_generator: read addresses and lit decisions of the waveform, scope and
// circle patterns against direct evaluations of their drawing rules.
module tb_generator;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  coord_t x, y;
  gen_cfg_t cfg;
  logic [15:0] age;
  logic signed [7:0] sample;
  logic [6:0] bin;
  logic [15:0] mag;
  logic lit;
  color_t color;

  generator #(.GLOBAL_W(1280), .GLOBAL_H(512), .DEPTH(48000), .N_BINS(128)) dut (
    .x, .y, .cfg, .sample_age(age), .sample, .bin, .mag, .lit, .color
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
    int t, d2, h, b, nlit;
    nlit = 0;
    cfg = '{kind: GEN_DISABLED, p1: 16'sd0, p2: 16'sd0, color: 12'hABC};
    x = 16'sd5; y = 16'sd5; sample = 0; mag = 0;
    #1 check(!lit, "disabled");
    check(color == 12'hABC, "colour");
    for (int i = 0; i < 3000; i++) begin
      x = coord_t'($urandom_range(0, 1279));
      y = coord_t'($urandom_range(0, 511));
      sample = 8'($urandom);
      mag = 16'($urandom_range(0, 2000));
      case (i % 3)
        0: begin
          cfg = '{kind: GEN_WAVEFORM, p1: 16'sd256, p2: 16'sd16, color: 12'hF00};
          y = coord_t'(256 + int'(sample) + int'($urandom_range(0, 4)) - 2);
          #1;
          t = 256 + int'(sample);
          check(age == 16'(x), "waveform age");
          check(lit == ((int'(y) - t) >= -1 && (int'(y) - t) <= 1), "waveform lit");
        end
        1: begin
          cfg = '{kind: GEN_SCOPE, p1: 16'sd400, p2: 16'h0023, color: 12'h0F0};
          #1;
          b = int'(x) >> 3;
          if (b > 127) b = 127;
          h = int'(mag) >> 2;
          check(int'(bin) == b, "scope bin");
          check(lit == (int'(y) <= 400 && 400 - int'(y) < h), "scope lit");
        end
        default: begin
          cfg = '{kind: GEN_CIRCLE, p1: 16'sd100, p2: 16'sd4, color: 12'h00F};
          x = coord_t'(640 + int'($urandom_range(0, 220)) - 110);
          y = coord_t'(256 + int'($urandom_range(0, 220)) - 110);
          #1;
          d2 = (int'(x) - 640) ** 2 + (int'(y) - 256) ** 2;
          check(lit == (d2 >= 96 * 96 && d2 <= 104 * 104), "circle lit");
        end
      endcase
      if (lit) nlit++;
    end
    check(nlit > 50, "some pixels lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
