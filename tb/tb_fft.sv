// tb_fft: a 32-point transform of a known signal (two tones plus noise)
// against a real-arithmetic DFT, the bins written in order, and the pass
// length of N/2 * (N + 2) clocks after new_frame is taken.
module tb_fft;
  import viz_pkg::*;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, new_frame = 0;
  logic [9:0] rd_age;
  logic signed [7:0] rd_data;
  logic we, busy, done;
  logic [3:0] waddr;
  logic [15:0] wdata;
  logic signed [7:0] x [N];       // x[0] is the oldest sample of the window
  logic [15:0] got [N/2];
  always #5 clk = ~clk;

  fft #(.N(N), .AGE_W(10)) dut (
    .clk, .rst, .new_frame, .rd_age, .rd_data, .we, .waddr, .wdata, .busy, .done
  );

  // sample FIFO stand-in: one-clock read latency, age 0 = newest = x[N-1]
  always_ff @(posedge clk) rd_data <= (rd_age < 10'(N)) ? x[N - 1 - int'(rd_age)] : 8'sd0;

  int next_bin = 0;
  always @(posedge clk) if (we && !rst) begin
    checks++;
    if (int'(waddr) != next_bin) begin failures++; $display("FAIL bin order"); end
    got[waddr] = wdata;
    next_bin++;
  end

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
    real re, im, ang, refm;
    int cycles;
    for (int pass = 0; pass < 3; pass++) begin
      for (int n = 0; n < N; n++) begin
        real v;
        v = 60.0 * $cos(6.283185307179586 * 3.0 * n / N) + 30.0 * $sin(6.283185307179586 * (pass + 5) * n / N);
        v = v + real'(int'($urandom_range(0, 10)) - 5);
        x[n] = 8'($rtoi(v));
      end
      if (pass == 0) begin
        repeat (2) @(negedge clk);
        rst = 0;
      end
      next_bin = 0;
      new_frame = 1;
      @(negedge clk);
      new_frame = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      // N/2 bins of N + 2 clocks, plus the clock that samples new_frame
      check(cycles == N / 2 * (N + 2) + 1, $sformatf("pass took %0d clocks", cycles));
      @(negedge clk);
      check(next_bin == N / 2, "all bins written");
      for (int k = 0; k < N / 2; k++) begin
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = 6.283185307179586 * k * n / N;
          re += real'(x[n]) * $cos(ang);
          im -= real'(x[n]) * $sin(ang);
        end
        refm = (re < 0 ? -re : re) + (im < 0 ? -im : im);
        check(real'(got[k]) > refm - 2.0 && real'(got[k]) < refm + 2.0,
              $sformatf("pass %0d bin %0d got %0d expected %f", pass, k, got[k], refm));
      end
      check(got[3] > 900 && got[pass + 5] > 400, "tones stand out");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
