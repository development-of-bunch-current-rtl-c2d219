// rev_sync: locks the ring memory address to the revolution timing.
//
// The ADC delivers one 16-bit word (two bunches) per RF/2 clock. After an
// `arm` pulse (the start command) the block waits for the next rising edge of
// the external revolution marker and restarts its word counter there; from
// then on the counter runs free modulo `turn_words` (harmonic number / 2),
// so every recorded word carries its bunch position. Synchronising once at
// start, then running free, follows the recorder's description; the two-flop
// synchroniser on the marker and the matching two-stage delay of the ADC
// words (so that the word that arrived together with the marker gets address
// 0) are this design's choices.
//
// Timing: word_o/addr_o/valid_o appear three clocks after adc_i. eot_o marks
// the last word of a turn.
// `disarm` drops valid_o and returns to idle.
module rev_sync
  import bcr_pkg::*;
#(
  parameter int unsigned ADDR_W = TURN_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rev_i,        // revolution marker, asynchronous
  input  logic [ADC_W-1:0]  adc_i,        // demultiplexed ADC word
  input  logic [ADDR_W:0]   turn_words,   // ADC words per turn (h / 2)
  input  logic              arm,          // start: wait for next revolution edge
  input  logic              disarm,       // stop address generation
  output logic [ADC_W-1:0]  word_o,
  output logic [ADDR_W-1:0] addr_o,
  output logic              valid_o,
  output logic              eot_o,
  output logic              waiting_o     // armed, no revolution edge seen yet
);

  logic [2:0]       rev_q;
  logic [ADC_W-1:0] adc_d1, adc_d2;
  logic             rev_edge;
  logic             armed;

  assign rev_edge = rev_q[1] & ~rev_q[2];

  always_ff @(posedge clk) begin
    rev_q  <= {rev_q[1:0], rev_i};
    adc_d1 <= adc_i;
    adc_d2 <= adc_d1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed   <= 1'b0;
      valid_o <= 1'b0;
      addr_o  <= '0;
      word_o  <= '0;
    end else begin
      word_o  <= adc_d2;
      if (disarm) begin
        armed   <= 1'b0;
        valid_o <= 1'b0;
      end else if (arm) begin
        armed   <= 1'b1;
        valid_o <= 1'b0;
      end else if (armed && rev_edge) begin
        armed   <= 1'b0;
        valid_o <= 1'b1;
        addr_o  <= '0;
      end else if (valid_o) begin
        addr_o <= (ADDR_W+1)'(addr_o) == turn_words - 1'b1 ? '0 : addr_o + 1'b1;
      end
    end
  end

  assign eot_o     = valid_o && ((ADDR_W+1)'(addr_o) == turn_words - 1'b1);
  assign waiting_o = armed;

endmodule
