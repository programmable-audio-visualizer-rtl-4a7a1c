// sram_model: behavioural model of one external synchronous SRAM chip.
// One access per clock: a write stores wdata at addr; a read returns the
// word at addr on rdata one clock later (rdata holds otherwise). Contents
// start at zero. Only for simulation of the frame buffers.
module sram_model
  import viz_pkg::*;
#(
  parameter int unsigned AW    = 20,
  parameter int unsigned WORDS = 1 << AW
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  color_t        wdata,
  output color_t        rdata
);
  color_t mem [WORDS];
  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (en && we && int'(addr) < int'(WORDS)) mem[addr] <= wdata;
    if (en && !we) rdata <= (int'(addr) < int'(WORDS)) ? mem[addr] : '0;
  end
endmodule
