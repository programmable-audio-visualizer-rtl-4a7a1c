// tb_alu: checks every ALU function on directed and random operands
// against a reference model computed in the testbench.
module tb_alu;
  import viz_pkg::*;
  int checks = 0, failures = 0;
  alufn_e fn;
  word_t  a, b, y, exp_y;

  alu dut (.fn, .a, .b, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t model(alufn_e f, word_t x, word_t z);
    int p;
    case (f)
      FN_ADD: return x + z;
      FN_SUB: return x - z;
      FN_MUL: begin p = int'(x) * int'(z); return word_t'(p); end
      FN_AND: return x & z;
      FN_OR:  return x | z;
      FN_XOR: return x ^ z;
      FN_SLT: return (int'(x) < int'(z)) ? 16'sd1 : 16'sd0;
      default: return word_t'(int'(x) >>> z[3:0]);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases
    fn = FN_ADD; a = 16'sd100; b = -16'sd3; #1 check(y == 16'sd97, "add");
    fn = FN_SUB; a = 16'sd5;   b = 16'sd9;  #1 check(y == -16'sd4, "sub");
    fn = FN_MUL; a = -16'sd7;  b = 16'sd6;  #1 check(y == -16'sd42, "mul");
    fn = FN_SLT; a = -16'sd1;  b = 16'sd0;  #1 check(y == 16'sd1, "slt signed");
    fn = FN_SLT; a = 16'sd3;   b = 16'sd3;  #1 check(y == 16'sd0, "slt equal");
    fn = FN_SHR; a = -16'sd64; b = 16'sd2;  #1 check(y == -16'sd16, "shr arithmetic");
    fn = FN_XOR; a = 16'h0ff0; b = 16'h00ff; #1 check(y == 16'h0f0f, "xor");
    for (int i = 0; i < 2000; i++) begin
      fn = alufn_e'($urandom_range(0, 7));
      a  = word_t'($urandom);
      b  = word_t'($urandom);
      #1;
      exp_y = model(fn, a, b);
      check(y == exp_y, $sformatf("fn=%0d a=%0d b=%0d y=%0d exp=%0d", fn, a, b, y, exp_y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
