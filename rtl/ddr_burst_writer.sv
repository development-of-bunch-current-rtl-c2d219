// ddr_burst_writer: empties the block-RAM write buffer into DDR2 in bursts.
//
// The DDR2 memory is used as a circular buffer of `cap_words` memory words
// starting at address 0. Whenever the buffer holds a full burst of BURST
// words, the writer issues one write command and then streams BURST data
// beats; the command address advances by BURST and wraps at cap_words (a
// multiple of BURST for all supported rings and sizes). After recording ends
// (`flushed`), whatever is left is written as a last burst whose missing
// beats carry no lane enables, and `flush_done` reports the buffer empty.
//
// Memory port (the user side of a DDR2 controller, this design's own
// simple form): a command is taken when cmd_valid and cmd_ready are both high;
// each data beat when wr_valid and wr_ready are both high; wr_en has one bit
// per 16-bit lane, 1 = write. Writing in bursts through a block-RAM buffer
// follows the recorder's description; the port and burst length are assumed.
module ddr_burst_writer
  import bcr_pkg::*;
#(
  parameter int unsigned AW    = 24,     // memory-word address (128 MB / 8 B)
  parameter int unsigned BURST = 32,
  parameter int unsigned CW    = 11      // width of the FIFO occupancy count
) (
  input  logic             clk,
  input  logic             rst,          // start of a recording: address 0
  input  logic [AW-1:0]    cap_words,
  // write buffer (show-ahead FIFO)
  input  logic [MEM_W-1:0] fifo_data,
  input  logic [LANES-1:0] fifo_en,
  input  logic             fifo_empty,
  input  logic [CW-1:0]    fifo_count,
  output logic             fifo_pop,
  input  logic             flushed,
  output logic             flush_done,
  // memory port
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output logic [AW-1:0]    cmd_addr,
  output logic             wr_valid,
  input  logic             wr_ready,
  output logic [MEM_W-1:0] wr_data,
  output logic [LANES-1:0] wr_en
);

  typedef enum logic [1:0] {W_IDLE, W_CMD, W_DATA} wstate_e;
  wstate_e state;

  localparam int unsigned BW = $clog2(BURST + 1);

  logic [BW-1:0] beat;        // beats sent in this burst
  logic [BW-1:0] nreal;       // beats of this burst that come from the FIFO
  logic          real_beat;

  assign real_beat  = beat < nreal;
  assign wr_valid   = (state == W_DATA) && (!real_beat || !fifo_empty);
  assign wr_data    = real_beat ? fifo_data : '0;
  assign wr_en      = real_beat ? fifo_en : '0;
  assign fifo_pop   = (state == W_DATA) && real_beat && !fifo_empty && wr_ready;
  assign cmd_valid  = (state == W_CMD);
  assign flush_done = (state == W_IDLE) && flushed && fifo_count == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= W_IDLE;
      cmd_addr <= '0;
      beat     <= '0;
      nreal    <= '0;
    end else begin
      case (state)
        W_IDLE: begin
          if (fifo_count >= CW'(BURST)) begin
            nreal <= BW'(BURST);
            state <= W_CMD;
          end else if (flushed && fifo_count != '0) begin
            nreal <= BW'(fifo_count);
            state <= W_CMD;
          end
        end
        W_CMD: if (cmd_ready) begin
          state <= W_DATA;
          beat  <= '0;
        end
        W_DATA: if (wr_valid && wr_ready) begin
          if (beat == BW'(BURST - 1)) begin
            state    <= W_IDLE;
            cmd_addr <= (cmd_addr + AW'(BURST) >= cap_words) ? '0 : cmd_addr + AW'(BURST);
          end
          beat <= beat + 1'b1;
        end
        default: state <= W_IDLE;
      endcase
    end
  end

endmodule
