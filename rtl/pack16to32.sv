// pack16to32: board-level converter from the FPGA's strobed narrow bus to
// the 32-bit VME data word.
//
// Each clock with `stb` high shifts one BUS_W-bit piece in; pieces arrive
// lowest first, so after 32/BUS_W strobes the word is complete, `valid`
// rises and `d32` holds it until the next word starts. `clr` (start of a VME
// read) drops `valid` and realigns the piece counter. The converter itself is
// named in the board's block diagram; its clocking is this design's choice.
module pack16to32 #(
  parameter int unsigned BUS_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             stb,
  input  logic [BUS_W-1:0] d,
  output logic [31:0]      d32,
  output logic             valid
);

  localparam int unsigned NPIECE = 32 / BUS_W;
  localparam int unsigned CW     = $clog2(NPIECE + 1);

  logic [CW-1:0] n;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      n     <= '0;
      valid <= 1'b0;
      if (rst) d32 <= '0;
    end else if (stb) begin
      d32 <= {d, d32[31:BUS_W]};
      if (n == CW'(NPIECE - 1)) begin
        n     <= '0;
        valid <= 1'b1;
      end else begin
        n     <= n + 1'b1;
        valid <= 1'b0;
      end
    end
  end

endmodule
