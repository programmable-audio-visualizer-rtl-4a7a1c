// sample_fifo: running buffer of the most recent audio samples.
// Every accepted sample (in_valid) overwrites the oldest entry of a circular
// block RAM of DEPTH entries, so the buffer always holds the last DEPTH
// samples: one second of audio at the default 48 kHz codec rate (the one-second
// length follows the document; the rate and the 8-bit signed sample width are
// this design's choices). N_RD independent read ports serve the FFT, the beat
// detector and the generators. A port is addressed by age: age 0 is the newest
// sample, age DEPTH-1 the oldest. Read data appears one clock after the age is
// presented (registered, block-RAM style). Ages beyond the number of samples
// written since reset read as 0, so the buffer needs no clearing.
module sample_fifo
  import viz_pkg::*;
#(
  parameter int unsigned DEPTH = 48000,
  parameter int unsigned N_RD  = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_sample,
  input  logic [N_RD-1:0][AW-1:0]    rd_age,
  output logic [N_RD-1:0][SAMPLE_W-1:0] rd_data   // signed samples
);
  logic [SAMPLE_W-1:0] mem [DEPTH];
  logic [AW-1:0]       wr_ptr;     // next location to write
  logic [AW:0]         fill;       // samples written, saturates at DEPTH

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      fill   <= '0;
    end else if (in_valid) begin
      wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr] <= in_sample;
  end

  for (genvar p = 0; p < N_RD; p++) begin : g_rd
    logic [AW:0] back;      // wr_ptr - 1 - age, may wrap below zero
    logic [AW-1:0] addr;
    logic          present;
    always_comb begin
      back    = {1'b0, wr_ptr} - (AW+1)'(rd_age[p]) - 1'b1;
      addr    = back[AW] ? AW'(back + (AW+1)'(DEPTH)) : back[AW-1:0];
      present = ({1'b0, rd_age[p]} < fill);
    end
    always_ff @(posedge clk) begin
      rd_data[p] <= present ? mem[addr] : '0;
    end
  end
endmodule
