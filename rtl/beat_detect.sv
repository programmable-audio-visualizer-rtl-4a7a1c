// beat_detect: decides once per frame whether the music has a beat now.
// When start pulses (the top drives it with the FFT's end-of-pass pulse, so
// it sees the spectrum of the current frame) the block sums the magnitudes of
// spectrum bins 1..BASS_BINS from fft_bram (bass energy) and the absolute
// values of the newest WIN samples from the sample FIFO (loudness), giving an
// energy E. It keeps a running average A <- A + (E - A)/8 over frames and
// reports a beat when E > 1.5 * A and E > MIN_E. beat_value holds
// min(E - A, 32767) while a beat is present and 0 otherwise; beat_pulse marks
// each evaluation that found a beat. Both read ports have one clock of
// latency. The document only says that the block reads the FFT BRAM and the
// sample buffer and produces a beat value; the energy-against-average rule and
// all constants are this design's choices.
// Timing: BASS_BINS + WIN + 3 clocks from start to the updated outputs.
module beat_detect
  import viz_pkg::*;
#(
  parameter int unsigned N_BINS    = 128,
  parameter int unsigned BASS_BINS = 8,
  parameter int unsigned WIN       = 256,
  parameter int unsigned MIN_E     = 64,
  parameter int unsigned AGE_W     = 16,
  localparam int unsigned BW       = $clog2(N_BINS)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  output logic [BW-1:0]              bin_addr,
  input  logic [MAG_W-1:0]           bin_data,
  output logic [AGE_W-1:0]           rd_age,
  input  logic signed [SAMPLE_W-1:0] rd_data,
  output word_t                      beat_value,
  output logic                       beat,
  output logic                       beat_pulse,
  output logic                       busy
);
  typedef enum logic [2:0] {S_IDLE, S_BINS, S_SAMP, S_DRAIN, S_EVAL} state_e;
  state_e state;

  logic [AGE_W-1:0] cnt;
  logic             bin_v, samp_v;
  logic [31:0]      energy, avg;

  assign bin_addr = BW'(cnt + 1'b1);            // bins 1..BASS_BINS
  assign rd_age   = cnt;
  assign busy     = (state != S_IDLE);

  logic [7:0]  abs_s;
  assign abs_s = rd_data[SAMPLE_W-1] ? 8'(-rd_data) : 8'(rd_data);

  logic [31:0] diff;
  assign diff = energy - avg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      bin_v      <= 1'b0;
      samp_v     <= 1'b0;
      energy     <= '0;
      avg        <= '0;
      beat_value <= '0;
      beat       <= 1'b0;
      beat_pulse <= 1'b0;
    end else begin
      beat_pulse <= 1'b0;
      bin_v      <= 1'b0;
      samp_v     <= 1'b0;
      if (bin_v)  energy <= energy + 32'(bin_data);
      if (samp_v) energy <= energy + 32'(abs_s);
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_BINS;
          cnt    <= '0;
          energy <= '0;
        end
        S_BINS: begin
          bin_v <= 1'b1;
          if (cnt == AGE_W'(BASS_BINS - 1)) begin
            cnt   <= '0;
            state <= S_SAMP;
          end else cnt <= cnt + 1'b1;
        end
        S_SAMP: begin
          samp_v <= 1'b1;
          if (cnt == AGE_W'(WIN - 1)) state <= S_DRAIN;
          else cnt <= cnt + 1'b1;
        end
        S_DRAIN: state <= S_EVAL;
        S_EVAL: begin
          state <= S_IDLE;
          // beat when E > 1.5 * A (2E > 3A) and loud enough
          if ((energy << 1) > (avg + (avg << 1)) && energy > MIN_E) begin
            beat       <= 1'b1;
            beat_pulse <= 1'b1;
            beat_value <= (diff > 32'd32767) ? 16'sd32767 : word_t'(diff[15:0]);
          end else begin
            beat       <= 1'b0;
            beat_value <= '0;
          end
          // running average over frames, A += (E - A) / 8
          if (energy >= avg) avg <= avg + ((energy - avg) >> 3);
          else               avg <= avg - ((avg - energy) >> 3);
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
