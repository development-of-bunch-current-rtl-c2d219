// readout_engine: returns the recorded data, oldest first, as a stream of
// ADC words for the VME data window.
//
// When a recording has finished (`go`), the engine copies memory words into
// the long read FIFO and unpacks them again into 16-bit ADC words:
//  * bunch current mode: the one-turn ring memory, from bunch 0, h/2 words;
//  * memory mode: DDR2, read in bursts of BURST words. If the circular buffer
//    wrapped, the data start at the write pointer (the oldest word) and the
//    whole capacity is returned, wrapping back through address 0; otherwise
//    the words from address 0 up to the write pointer are returned.
// DDR2 reads start at a burst-aligned address; the ADC words ahead of the
// first wanted one are dropped by the unpacker (`skip`). A read command is
// issued only when the FIFO has room for the whole burst on top of the beats
// still in flight, so the memory side never needs back-pressure; the FIFO is
// what hides DDR2 refresh pauses from the VME reader.
// Block RAM to long FIFO to VME follows the recorder's description; the
// ordering of a wrapped buffer and the stream interface are this design's.
//
// Stream: out_valid/out_data/out_ready; `exhausted` once all words were
// taken. `clear` (new start) empties everything.
module readout_engine
  import bcr_pkg::*;
#(
  parameter int unsigned AW       = 24,       // DDR2 memory-word address
  parameter int unsigned PTR_W    = AW + 2,   // ADC-word pointer width
  parameter int unsigned BURST    = 32,
  parameter int unsigned FDEPTH   = 1024,     // long FIFO, memory words
  parameter int unsigned RING_D   = (H_MAX / 2 + LANES - 1) / LANES
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clear,
  input  logic                      go,
  input  mode_e                     mode,
  input  logic [TURN_W:0]           turn_words,  // h/2
  input  logic [PTR_W-1:0]          wptr,        // memory mode write pointer
  input  logic                      wrapped,
  input  logic [PTR_W-1:0]          capacity,    // ADC words
  input  logic [AW-1:0]             cap_words,   // memory words
  // ring memory read port (1 clock latency)
  output logic [$clog2(RING_D)-1:0] ring_raddr,
  input  logic [MEM_W-1:0]          ring_rdata,
  // DDR2 read port
  output logic                      rd_cmd_valid,
  input  logic                      rd_cmd_ready,
  output logic [AW-1:0]             rd_cmd_addr,
  input  logic                      rd_valid,
  input  logic [MEM_W-1:0]          rd_data,
  // ADC word stream
  output logic                      out_valid,
  output logic [ADC_W-1:0]          out_data,
  input  logic                      out_ready,
  output logic                      exhausted,
  output logic [PTR_W-1:0]          total_words  // ADC words of this readout
);

  localparam int unsigned FCW = $clog2(FDEPTH) + 2;

  logic             active;
  mode_e            src;
  logic [PTR_W-1:0] fetch_left;    // memory words still to fetch
  logic [PTR_W-1:0] remaining;     // ADC words still to deliver
  logic [7:0]       skip_left;
  logic [1:0]       lane;
  logic [FCW-1:0]   inflight;      // beats / ring words requested, not pushed
  logic             ring_rd_q;

  // FIFO
  logic             f_push, f_pop, f_empty, f_full;
  logic [MEM_W-1:0] f_din, f_dout;
  logic [FCW-1:0]   f_count;

  sync_fifo #(.W(MEM_W), .DEPTH(FDEPTH)) u_fifo (
    .clk, .rst(rst | clear), .push(f_push), .din(f_din), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count)
  );

  // ---- fetch side ----
  logic [PTR_W-1:0] start_ptr, nwords;
  logic [AW-1:0]    start_addr;
  logic [PTR_W+1:0] first_skip;

  always_comb begin
    if (mode == MODE_BUNCH) begin
      start_ptr = '0;
      nwords    = PTR_W'(turn_words);
    end else if (wrapped) begin
      start_ptr = wptr;
      nwords    = capacity;
    end else begin
      start_ptr = '0;
      nwords    = wptr;
    end
    // burst-aligned first memory word
    start_addr = AW'((start_ptr >> 2) / PTR_W'(BURST) * PTR_W'(BURST));
    first_skip = (PTR_W+2)'(start_ptr) - ((PTR_W+2)'(start_addr) << 2);
  end

  logic ring_issue, ddr_issue;
  assign ring_issue   = active && src == MODE_BUNCH && fetch_left != '0 &&
                        (f_count + inflight) < FCW'(FDEPTH - 2);
  assign rd_cmd_valid = active && src == MODE_MEMORY && fetch_left != '0 &&
                        (f_count + inflight + FCW'(BURST)) <= FCW'(FDEPTH);
  assign ddr_issue    = rd_cmd_valid && rd_cmd_ready;

  assign f_push = (src == MODE_BUNCH) ? ring_rd_q : rd_valid;
  assign f_din  = (src == MODE_BUNCH) ? ring_rdata : rd_data;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      active      <= 1'b0;
      src         <= MODE_BUNCH;
      fetch_left  <= '0;
      ring_raddr  <= '0;
      rd_cmd_addr <= '0;
      inflight    <= '0;
      ring_rd_q   <= 1'b0;
      remaining   <= '0;
      skip_left   <= '0;
      total_words <= '0;
    end else begin
      ring_rd_q <= ring_issue;
      if (go && !active) begin
        active      <= 1'b1;
        src         <= mode;
        remaining   <= nwords;
        total_words <= nwords;
        skip_left   <= (mode == MODE_BUNCH) ? 8'd0 : 8'(first_skip);
        fetch_left  <= (mode == MODE_BUNCH)
                     ? (nwords + PTR_W'(LANES - 1)) >> 2
                     : PTR_W'((first_skip + (PTR_W+2)'(nwords) + (PTR_W+2)'(LANES - 1)) >> 2);
        rd_cmd_addr <= start_addr;
        ring_raddr  <= '0;
      end else begin
        if (ring_issue) begin
          ring_raddr <= ring_raddr + 1'b1;
          fetch_left <= fetch_left - 1'b1;
        end
        if (ddr_issue) begin
          fetch_left  <= (fetch_left > PTR_W'(BURST)) ? fetch_left - PTR_W'(BURST) : '0;
          rd_cmd_addr <= (rd_cmd_addr + AW'(BURST) >= cap_words) ? '0 : rd_cmd_addr + AW'(BURST);
        end
        inflight <= inflight + (ring_issue ? FCW'(1) : '0) + (ddr_issue ? FCW'(BURST) : '0)
                             - (f_push ? FCW'(1) : '0);
        if (out_valid && out_ready) remaining <= remaining - 1'b1;
        if (!f_empty && skip_left != '0) skip_left <= skip_left - 1'b1;
      end
    end
  end

  // ---- unpack side ----
  logic consume;
  assign out_valid = active && !f_empty && skip_left == '0 && remaining != '0;
  assign out_data  = f_dout[lane*ADC_W +: ADC_W];
  // a lane is used up when skipped, delivered, or left over after the end
  assign consume   = !f_empty && (skip_left != '0 || (out_valid && out_ready) ||
                                  (active && remaining == '0));
  assign f_pop     = consume && lane == 2'(LANES - 1);
  assign exhausted = active && remaining == '0;

  always_ff @(posedge clk) begin
    if (rst || clear || (go && !active)) lane <= '0;
    else if (consume) lane <= lane + 1'b1;
  end

endmodule
