// processor: the frame processor that runs the user's visualizer program.
// Each video frame it executes the program in instruction memory from the
// first word to the first empty word. Arithmetic instructions take one clock:
// the instruction memory output (instr[pc]) names registers A and B and the
// destination; asel may replace A by the beat value, the buttons or zero;
// the ALU result is written back. SKIP implements the program's
// "if (rX) skip n". CONVOLVE and GENERATE start the effects engine (c_enable /
// g_enable) on the configuration registers, which reach it through the
// register file's fixed read ports (fx_params); the pc holds meanwhile. At
// the empty word the processor waits for frame_sync, restarts the program and
// toggles flip, which swaps the front and back frame buffers.
// The instruction memory is addressed with the next pc, so its registered
// output always holds instr[pc] and there is no fetch bubble. The structure
// follows the document's processor diagram; the instruction encoding
// (viz_pkg), the immediate operand and the wait for frame_sync are this
// design's choices.
module processor
  import viz_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned PIXELS     = 1280 * 512,
  parameter int unsigned NBUTTONS   = 8,
  localparam int unsigned AW        = $clog2(IMEM_DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  // program loading
  input  logic                imem_we,
  input  logic [AW-1:0]       imem_waddr,
  input  instr_t              imem_wdata,
  // external operands
  input  word_t               beat,
  input  logic [NBUTTONS-1:0] buttons,
  input  logic                frame_sync,
  // effects engine
  input  logic                fx_busy,
  output logic                c_enable,
  output logic                g_enable,
  output fx_params_t          fx_params,
  output logic                flip,
  output logic [AW-1:0]       pc
);
  logic [AW-1:0] next_pc, fetch_addr;
  instr_t        instr;
  logic          pcsel, werf, bsel_imm, timer_start, timer_done, inc_reset, z;
  logic [15:0]   inc_val;
  alufn_e        alufn;
  asel_e         asel_s;
  word_t         rda, rdb, a_op, b_op, alu_y;
  logic [31:0]   t_value;

  pc_reg #(.AW(AW)) u_pc (
    .clk, .rst, .pcsel, .next_pc, .pc, .fetch_addr
  );

  increment #(.AW(AW)) u_inc (
    .clk, .rst, .pc, .inc_val, .inc_reset, .advance(pcsel), .next_pc, .flip
  );

  instruction_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .raddr(fetch_addr), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  time_logic #(.PIXELS(PIXELS)) u_tl (.instr, .value(t_value));

  timer #(.W(32)) u_timer (
    .clk, .rst, .start(timer_start), .value(t_value), .en(1'b1), .done(timer_done)
  );

  control_logic u_ctl (
    .clk, .rst, .instr, .z, .timer_done, .fx_busy, .frame_sync,
    .pcsel, .werf, .alufn, .asel(asel_s), .bsel_imm, .c_enable, .g_enable,
    .timer_start, .inc_reset, .inc_val
  );

  register_file u_rf (
    .clk, .rst, .we(werf), .wa(instr.wa), .wd(alu_y),
    .ra(instr.ra), .rb(instr.imm[RADDR_W-1:0]), .rda, .rdb, .fx_params
  );

  assign z = (rda == '0);   // zero test on register A, as in the diagram

  asel #(.NBUTTONS(NBUTTONS)) u_asel (
    .sel(asel_s), .reg_a(rda), .beat, .buttons, .a(a_op)
  );

  assign b_op = bsel_imm ? word_t'(instr.imm) : rdb;

  alu u_alu (.fn(alufn), .a(a_op), .b(b_op), .y(alu_y));
endmodule
