// instruction_mem: block RAM holding the visualizer program.
// DEPTH words of 36 bits (the instruction format is in viz_pkg). One
// synchronous read port for the processor (data one clock after the address)
// and one write port through which a host loads or edits the program while
// the system runs. A program ends at its first all-zero (empty) word, so the
// memory is cleared at start-up: an unloaded memory is an empty program.
module instruction_mem
  import viz_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic [AW-1:0] raddr,
  output instr_t       rdata,
  input  logic         we,
  input  logic [AW-1:0] waddr,
  input  instr_t       wdata
);
  instr_t mem [DEPTH];
  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
