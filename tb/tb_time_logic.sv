// tb_time_logic: the processor's cycle budget per opcode.
module tb_time_logic;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  instr_t      instr;
  logic [31:0] value;

  time_logic #(.PIXELS(100), .CONV_MIN(5), .GEN_MIN(6)) dut (.instr, .value);

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
      instr = instr_t'({$urandom, $urandom});
      #1;
      case (instr.op)
        OP_CONV: check(value == 32'd500, "convolve");
        OP_GEN:  check(value == 32'd600, "generate");
        default: check(value == 32'd0, "single clock");
      endcase
    end
    instr = '0; instr.op = OP_CONV; #1 check(value == 32'd500, "convolve directed");
    instr.op = OP_GEN;  #1 check(value == 32'd600, "generate directed");
    instr.op = OP_ALUI; #1 check(value == 32'd0, "alu directed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
