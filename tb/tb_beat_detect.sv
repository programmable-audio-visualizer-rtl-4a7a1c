// tb_beat_detect: frames of random spectra and samples, with occasional loud
// bass frames, against a reference of the energy / running-average rule;
// also the evaluation latency of BASS_BINS + WIN + 3 clocks.
module tb_beat_detect;
  import viz_pkg::*;
  localparam int BASS = 4, WIN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [6:0] bin_addr;
  logic [15:0] bin_data;
  logic [9:0] rd_age;
  logic signed [7:0] rd_data;
  word_t beat_value;
  logic beat, beat_pulse, busy;
  logic [15:0] spec [128];
  logic signed [7:0] smp [WIN];
  always #5 clk = ~clk;

  beat_detect #(.N_BINS(128), .BASS_BINS(BASS), .WIN(WIN), .MIN_E(64), .AGE_W(10)) dut (
    .clk, .rst, .start, .bin_addr, .bin_data, .rd_age, .rd_data,
    .beat_value, .beat, .beat_pulse, .busy
  );

  always_ff @(posedge clk) begin
    bin_data <= spec[bin_addr];
    rd_data  <= (rd_age < 10'(WIN)) ? smp[rd_age] : 8'sd0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, avg, d;
    int nbeats = 0, cycles;
    bit loud, exp_beat;
    avg = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 200; f++) begin
      loud = (f % 10 == 9);
      for (int b = 0; b < 128; b++) spec[b] = 16'($urandom_range(0, loud ? 4000 : 300));
      for (int i = 0; i < WIN; i++) smp[i] = 8'($urandom_range(0, 60) - 30);
      e = 0;
      for (int b = 1; b <= BASS; b++) e += spec[b];
      for (int i = 0; i < WIN; i++) e += (smp[i] < 0) ? -smp[i] : smp[i];
      exp_beat = (2 * e > 3 * avg) && (e > 64);
      d = e - avg;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (busy) begin @(negedge clk); cycles++; end
      check(cycles == BASS + WIN + 3, $sformatf("latency %0d", cycles));
      check(beat == exp_beat, $sformatf("frame %0d beat %0d expected %0d", f, beat, exp_beat));
      check(beat_value == (exp_beat ? word_t'((d > 32767) ? 32767 : d) : 16'sd0), "beat value");
      if (beat) nbeats++;
      if (e >= avg) avg = avg + ((e - avg) >> 3);
      else          avg = avg - ((avg - e) >> 3);
      repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    check(nbeats >= 15 && nbeats < 100, $sformatf("%0d beats", nbeats));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
