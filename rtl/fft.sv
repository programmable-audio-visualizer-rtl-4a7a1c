// fft: spectrum of the most recent N audio samples, computed once per frame.
// On every new_frame pulse (ignored while a pass is running) the block reads
// the newest N samples from the sample FIFO and computes, bin by bin, the
// discrete Fourier transform X[k] = sum_n x[n] * exp(-j*2*pi*k*n/N) for
// k = 0 .. N/2-1 with one multiply-accumulate pair per clock. It writes the
// magnitude estimate (|Re| + |Im|) >> 14, saturated to 16 bits, to fft_bram[k].
// The document asks for an FFT of the sample buffer on every new_frame and
// its results in the FFT BRAM; how it is computed is not given. This design
// uses the direct bin-by-bin transform because it needs one multiplier pair
// and a full-wave sine table: a pass takes N/2 * (N + 2) clocks
// (33 024 at N = 256), far below one video frame. Sine and cosine come from
// a table of N Q1.14 entries filled at start-up.
// Sample port: rd_age is presented one clock before rd_data is used.
module fft
  import viz_pkg::*;
#(
  parameter int unsigned N      = 256,
  parameter int unsigned AGE_W  = 16,
  localparam int unsigned NB    = N / 2,
  localparam int unsigned LN    = $clog2(N),
  localparam int unsigned BW    = $clog2(NB)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       new_frame,
  // sample FIFO read port
  output logic [AGE_W-1:0]           rd_age,
  input  logic signed [SAMPLE_W-1:0] rd_data,
  // fft_bram write port
  output logic                       we,
  output logic [BW-1:0]              waddr,
  output logic [MAG_W-1:0]           wdata,
  output logic                       busy,
  output logic                       done      // one-clock pulse per pass
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_WRITE} state_e;
  state_e state;

  logic signed [15:0] sin_t [N];
  logic signed [15:0] cos_t [N];
  initial begin
    for (int i = 0; i < int'(N); i++) begin
      sin_t[i] = sin_q14(i, N);
      cos_t[i] = sin_q14(i + N / 4, N);
    end
  end

  logic [LN-1:0] n, idx, idx_d;
  logic [BW-1:0] k;
  logic          valid_d;
  logic signed [39:0] acc_re, acc_im;

  assign rd_age = AGE_W'(N - 1) - AGE_W'(n);   // oldest sample of the window first
  assign busy   = (state != S_IDLE);

  // magnitude of the finished bin
  logic [39:0] abs_re, abs_im, mag;
  always_comb begin
    abs_re = acc_re[39] ? 40'(-acc_re) : 40'(acc_re);
    abs_im = acc_im[39] ? 40'(-acc_im) : 40'(acc_im);
    mag    = (abs_re + abs_im) >> 14;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      n       <= '0;
      idx     <= '0;
      idx_d   <= '0;
      k       <= '0;
      valid_d <= 1'b0;
      acc_re  <= '0;
      acc_im  <= '0;
      we      <= 1'b0;
      waddr   <= '0;
      wdata   <= '0;
      done    <= 1'b0;
    end else begin
      we      <= 1'b0;
      done    <= 1'b0;
      valid_d <= 1'b0;
      // accumulate stage: sample for index idx_d arrives now
      if (valid_d) begin
        acc_re <= acc_re + 40'(rd_data * cos_t[idx_d]);
        acc_im <= acc_im - 40'(rd_data * sin_t[idx_d]);
      end
      unique case (state)
        S_IDLE: if (new_frame) begin
          state <= S_RUN;
          k     <= '0;
          n     <= '0;
          idx   <= '0;
        end
        S_RUN: begin
          valid_d <= 1'b1;
          idx_d   <= idx;
          idx     <= idx + LN'(k);
          n       <= n + 1'b1;
          if (n == LN'(N - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: begin
          we     <= 1'b1;
          waddr  <= k;
          wdata  <= (mag > 40'(16'hFFFF)) ? 16'hFFFF : mag[15:0];
          acc_re <= '0;
          acc_im <= '0;
          n      <= '0;
          idx    <= '0;
          if (k == BW'(NB - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k     <= k + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
