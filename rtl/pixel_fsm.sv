// pixel_fsm: the effects engine's sequencer over the whole virtual buffer.
// A c_enable (convolve) or g_enable (generate) pulse starts a sweep of every
// pixel (x, y), row by row. For each pixel it spends one clock in START,
// where it starts the effects timer with the budget from effects_time_logic
// and starts the convolution walker; then RUN, until the timer is done (in
// generate mode it also requests the pixel's current value from the back
// buffer for blending, holding the request until granted); then WRITE, where
// it writes the finished colour to the back buffer and waits for the write to
// be granted. busy is high from the clock after the enable until the sweep
// ends. Enables that arrive during a sweep are ignored.
// Not named in the document's text, this block appears in its effects
// diagram with the enable input, the timer start/done pair, the x, y outputs
// and the memory write; its state sequence is this design's.
module pixel_fsm
  import viz_pkg::*;
#(
  parameter int unsigned GLOBAL_W = 1280,
  parameter int unsigned GLOBAL_H = 512
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   c_enable,
  input  logic   g_enable,
  output logic   busy,
  output logic   conv_mode,
  output coord_t x,
  output coord_t y,
  output logic   start,        // first clock of a pixel
  input  logic   timer_done,
  output logic   pix_rd_req,   // generate mode: read the back-buffer pixel
  input  logic   pix_rd_ready,
  output logic   wr_req,
  input  logic   wr_ready
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_WRITE} state_e;
  state_e state;
  logic   rd_done;

  assign busy       = (state != S_IDLE);
  assign start      = (state == S_START);
  assign pix_rd_req = (state == S_RUN) && !conv_mode && !rd_done;
  assign wr_req     = (state == S_WRITE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      conv_mode <= 1'b0;
      x         <= '0;
      y         <= '0;
      rd_done   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (c_enable || g_enable) begin
          conv_mode <= c_enable;
          x         <= '0;
          y         <= '0;
          state     <= S_START;
        end
        S_START: begin
          rd_done <= 1'b0;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (pix_rd_req && pix_rd_ready) rd_done <= 1'b1;
          if (timer_done) state <= S_WRITE;
        end
        S_WRITE: if (wr_ready) begin
          if (x == coord_t'(GLOBAL_W - 1)) begin
            x <= '0;
            if (y == coord_t'(GLOBAL_H - 1)) begin
              y     <= '0;
              state <= S_IDLE;
            end else begin
              y     <= y + 1'b1;
              state <= S_START;
            end
          end else begin
            x     <= x + 1'b1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
