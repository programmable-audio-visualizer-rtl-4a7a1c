// tb_asel: checks the four sources of the A operand multiplexer.
module tb_asel;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  asel_e      sel;
  word_t      reg_a, beat, a;
  logic [7:0] buttons;

  asel #(.NBUTTONS(8)) dut (.sel, .reg_a, .beat, .buttons, .a);

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
    for (int i = 0; i < 200; i++) begin
      reg_a   = word_t'($urandom);
      beat    = word_t'($urandom);
      buttons = 8'($urandom);
      sel = ASEL_REG;     #1 check(a == reg_a, "reg");
      sel = ASEL_BEAT;    #1 check(a == beat, "beat");
      sel = ASEL_BUTTONS; #1 check(a == word_t'({8'd0, buttons}), "buttons");
      sel = ASEL_ZERO;    #1 check(a == 16'sd0, "zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
