// tb_register_file: random writes and reads against a model; register 0
// reads zero; the fixed configuration ports show the mapped registers.
module tb_register_file;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [5:0] wa = 0, ra = 0, rb = 0;
  word_t wd = 0, rda, rdb;
  fx_params_t fx;
  word_t model [64];
  always #5 clk = ~clk;

  register_file dut (.clk, .rst, .we, .wa, .wd, .ra, .rb, .rda, .rdb, .fx_params(fx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 64; i++) model[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom);
      wa = 6'($urandom);
      wd = word_t'($urandom);
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
      we = 0;
      ra = 6'($urandom);
      rb = 6'($urandom);
      #1;
      check(rda == model[ra] && rdb == model[rb], "read ports");
      if (i % 50 == 0) begin
        check(fx.mot[0].kind == motion_e'(model[32][1:0]) && fx.mot[1].p2 == model[37], "motion ports");
        check(fx.gen[0].kind == gen_e'(model[38][1:0]) && fx.gen[1].p1 == model[43] &&
              fx.gen[1].color == color_t'(model[45][11:0]), "generator ports");
        check(fx.blend == blend_e'(model[46][1:0]) && fx.conv_shift == model[47][3:0], "blend, shift");
        for (int t = 0; t < 9; t++) check(fx.conv_k[t] == model[48 + t], "kernel port");
      end
    end
    ra = 0; #1 check(rda == 0, "r0 is zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
