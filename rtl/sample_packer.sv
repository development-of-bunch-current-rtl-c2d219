// sample_packer: gathers four consecutive ADC words into one memory word.
//
// In large scale memory mode every recorded ADC word (two bunches) goes to
// DDR2. This block collects them, lowest lane first, into MEM_W-bit words
// with one enable bit per lane and hands each full word to the block-RAM
// write buffer. When recording ends (`flush` rises) a partly filled word is
// sent with only its written lanes enabled, so the DDR2 words on both sides
// of the stop point keep their data. `flushed` rises two clocks after flush,
// once that last word has reached the FIFO's occupancy count.
// Lane order and the lane enables are this design's choices.
module sample_packer
  import bcr_pkg::*;
(
  input  logic             clk,
  input  logic             rst,       // start of a recording: lane 0
  input  logic             we,
  input  logic [ADC_W-1:0] word,
  input  logic             flush,     // level: recording has ended
  output logic             out_valid,
  output logic [MEM_W-1:0] out_data,
  output logic [LANES-1:0] out_en,
  output logic             flushed
);

  logic [1:0]             lane;
  logic [MEM_W-1:0]       acc;
  logic [LANES-1:0]       acc_en;
  logic                   flush_d1, flush_d2;

  assign flushed = flush & flush_d2;

  always_ff @(posedge clk) begin
    if (rst) begin
      lane      <= '0;
      acc_en    <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_en    <= '0;
      flush_d1  <= 1'b0;
      flush_d2  <= 1'b0;
    end else begin
      flush_d1  <= flush;
      flush_d2  <= flush_d1;
      out_valid <= 1'b0;
      if (we) begin
        acc[lane*ADC_W +: ADC_W] <= word;
        acc_en[lane]             <= 1'b1;
        lane                     <= lane + 1'b1;
        if (lane == 2'(LANES - 1)) begin
          out_valid <= 1'b1;
          out_data  <= acc;
          out_data[lane*ADC_W +: ADC_W] <= word;
          out_en    <= '1;
          acc_en    <= '0;
        end
      end else if (flush && !flush_d1 && lane != '0) begin
        out_valid <= 1'b1;
        out_data  <= acc;
        out_en    <= acc_en;
        acc_en    <= '0;
        lane      <= '0;
      end
    end
  end

endmodule
