// fft_bram: block RAM holding the spectrum of the latest frame.
// The FFT writes one magnitude per bin through its single write port; the
// beat detector and every generator read it through their own registered
// read ports (one clock of latency). Replicated read ports model the
// multi-port access the document calls for; N_BINS (half the FFT length) and
// the 16-bit magnitude width are this design's choices. A read before the first
// spectrum has been written returns whatever the RAM powered up with.
module fft_bram
  import viz_pkg::*;
#(
  parameter int unsigned N_BINS = 128,
  parameter int unsigned N_RD   = 3,
  localparam int unsigned BW    = $clog2(N_BINS)
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [BW-1:0]                 waddr,
  input  logic [MAG_W-1:0]              wdata,
  input  logic [N_RD-1:0][BW-1:0]       raddr,
  output logic [N_RD-1:0][MAG_W-1:0]    rdata
);
  logic [MAG_W-1:0] mem [N_BINS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < N_RD; p++) begin : g_rd
    always_ff @(posedge clk) rdata[p] <= mem[raddr[p]];
  end
endmodule
