// ring_buffer: one-turn ring memory of the bunch current mode.
//
// Holds one ADC word (two bunches) per bunch-pair position of a revolution,
// H/2 words for harmonic number H, in block RAM. The write side takes one ADC
// word per clock at its position in the turn; positions repeat every turn, so
// the memory always holds the most recent turn. To share the read datapath
// with the DDR2 path it is organised as MEM_W-bit words of four ADC-word
// lanes with a write enable per lane. Read latency is one clock.
// One-turn depth in block RAM follows the recorder's description; the lane
// organisation is this design's choice.
module ring_buffer
  import bcr_pkg::*;
#(
  parameter int unsigned H     = H_MAX,             // largest harmonic number held
  parameter int unsigned DEPTH = (H / 2 + LANES - 1) / LANES,
  parameter int unsigned AW    = $clog2(H / 2)      // ADC-word address width
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,    // ADC-word position in the turn
  input  logic [ADC_W-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,    // memory-word address
  output logic [MEM_W-1:0]         rdata
);

  logic [MEM_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (we && waddr[1:0] == 2'(l))
        mem[waddr[AW-1:2]][l*ADC_W +: ADC_W] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
