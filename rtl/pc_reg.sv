// pc_reg: the frame processor's program counter.
// Loads next_pc when pcsel is high and holds otherwise (while a long
// convolve/generate runs, or while the program waits for the next frame).
// Reset puts it on the first instruction. fetch_addr is the address the
// instruction memory must read this clock so that its registered output
// shows instr[pc] on the next one (the value pc will have then).
module pc_reg #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pcsel,     // 1: advance to next_pc, 0: hold
  input  logic [AW-1:0] next_pc,
  output logic [AW-1:0] pc,
  output logic [AW-1:0] fetch_addr
);
  assign fetch_addr = rst ? '0 : (pcsel ? next_pc : pc);

  always_ff @(posedge clk) begin
    if (rst)        pc <= '0;
    else if (pcsel) pc <= next_pc;
  end
endmodule
