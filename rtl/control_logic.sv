// control_logic: decodes the current instruction into the processor's
// control signals and sequences long instructions.
// In the EXEC state one instruction completes per clock:
//   ALU / ALUI  write the ALU result (werf) and step on;
//   SKIP        steps on by 1 when Z is high (register A is zero), otherwise
//               by imm + 1, skipping imm instructions;
//   END (empty) waits for frame_sync, then resets the pc to the first
//               instruction (inc_reset), which also flips the buffers;
//   CONV / GEN  pulse c_enable / g_enable and start the timer with the value
//               from time_logic, then go to WAIT.
// In WAIT the pc holds until the timer is done and the effects engine is idle.
// Waiting for frame_sync at the empty instruction is this design's choice: it
// swaps buffers only between video frames, so a finished frame is shown whole.
// The register-address fields of the instruction are not decoded here (they go
// straight to the register file), so those bits are unused.
module control_logic
  import viz_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  instr_t      instr,
  input  logic        z,
  input  logic        timer_done,
  input  logic        fx_busy,
  input  logic        frame_sync,
  output logic        pcsel,       // 1: advance the pc this clock
  output logic        werf,
  output alufn_e      alufn,
  output asel_e       asel,
  output logic        bsel_imm,    // ALU B operand is the immediate
  output logic        c_enable,
  output logic        g_enable,
  output logic        timer_start,
  output logic        inc_reset,
  output logic [15:0] inc_val
);
  typedef enum logic {S_EXEC, S_WAIT} state_e;
  state_e state, state_n;

  always_comb begin
    pcsel       = 1'b0;
    werf        = 1'b0;
    alufn       = instr.fn;
    asel        = instr.asel;
    bsel_imm    = (instr.op == OP_ALUI);
    c_enable    = 1'b0;
    g_enable    = 1'b0;
    timer_start = 1'b0;
    inc_reset   = 1'b0;
    inc_val     = 16'd1;
    state_n     = state;
    if (state == S_EXEC) begin
      unique case (instr.op)
        OP_END: begin
          inc_reset = 1'b1;
          pcsel     = frame_sync;
        end
        OP_ALU, OP_ALUI: begin
          werf  = 1'b1;
          pcsel = 1'b1;
        end
        OP_SKIP: begin
          pcsel   = 1'b1;
          inc_val = z ? 16'd1 : instr.imm + 16'd1;
        end
        OP_CONV, OP_GEN: begin
          c_enable    = (instr.op == OP_CONV);
          g_enable    = (instr.op == OP_GEN);
          timer_start = 1'b1;
          state_n     = S_WAIT;
        end
        default: pcsel = 1'b1;   // reserved opcodes do nothing
      endcase
    end else begin
      if (timer_done && !fx_busy) begin
        pcsel   = 1'b1;
        state_n = S_EXEC;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_EXEC;
    else     state <= state_n;
  end
endmodule
