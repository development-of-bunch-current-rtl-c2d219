// bcr_top: digital core of the bunch current and oscillation recorder.
//
// An 8-bit ADC samples every RF bucket (508.886 MHz); its built-in 1:2
// demultiplexer hands the FPGA one 16-bit word of two bunches per RF/2 clock,
// and `clk` is that RF/2 clock. The recorder has two modes, chosen on a DIP
// switch together with the ring (harmonic number 5120, 640, 312 or 230):
//  * bunch current mode: a one-turn ring memory in block RAM, aligned to the
//    revolution marker, is overwritten every turn until a stop arrives; it
//    then completes the turn, raises a VME interrupt and holds the data;
//  * large scale memory mode: every word goes through a block-RAM buffer to
//    DDR2, used as a circular buffer of 4k, 8k or 16k turns; the stop
//    position in the buffer is set by the trigger position (-100 %, 0 %,
//    100 %).
// Recorded data leave through the long read FIFO, a narrow strobed bus, a
// 16-to-32-bit converter and the VME CPLD, either by D32 single cycles or by
// BLT. The CPLD also holds the RF clock delay setting and issues the ADC
// demultiplexer reset.
//
// Outside this module: the ADC, the RF delay chip, the analog front end and
// the DDR2 memory with its controller. The controller is reached through a
// simple burst port (mem_*): commands of BURST memory words, lane enables on
// write data, and read data returned in order without back-pressure.
// This design runs the FPGA and CPLD logic on the one RF/2 clock; the VME
// strobes are synchronised to it.
module bcr_top
  import bcr_pkg::*;
#(
  parameter int unsigned AW     = 24,    // DDR2 memory words: 128 MB / 8 B
  parameter int unsigned BURST  = 32,    // memory words per DDR2 burst
  parameter int unsigned WDEPTH = 512,   // DDR2 write buffer, memory words
  parameter int unsigned RDEPTH = 1024,  // long read FIFO, memory words
  parameter int unsigned BUS_W  = 16     // FPGA to converter bus width
) (
  input  logic               clk,        // RF/2 from the ADC
  input  logic               rst,
  // ADC and front end
  input  logic [ADC_W-1:0]   adc_data,   // {odd bunch, even bunch}
  output logic               adc_dmx_rst,
  output logic [DELAY_W-1:0] rf_delay_code,
  input  logic               rev_i,      // revolution marker
  input  logic               trig_i,     // stop trigger
  // board switches
  input  mode_e              sw_mode,
  input  ring_e              sw_ring,
  input  logic [31:9]        sw_base,
  input  logic [2:0]         sw_irq_level,
  input  logic [7:0]         sw_irq_vector,
  // VME bus
  input  logic [31:1]        vme_a,
  input  logic [5:0]         vme_am,
  input  logic               vme_as_n,
  input  logic [1:0]         vme_ds_n,
  input  logic               vme_write_n,
  input  logic               vme_iack_n,
  input  logic               vme_iackin_n,
  output logic               vme_iackout_n,
  input  logic [31:0]        vme_d_i,
  output logic [31:0]        vme_d_o,
  output logic               vme_d_oe,
  output logic               vme_dtack_n,
  output logic [7:1]         vme_irq_n,
  // DDR2 controller user port
  output logic               mem_cmd_valid,
  input  logic               mem_cmd_ready,
  output logic               mem_cmd_we,
  output logic [AW-1:0]      mem_cmd_addr,
  output logic               mem_wr_valid,
  input  logic               mem_wr_ready,
  output logic [MEM_W-1:0]   mem_wr_data,
  output logic [LANES-1:0]   mem_wr_en,
  input  logic               mem_rd_valid,
  input  logic [MEM_W-1:0]   mem_rd_data
);

  localparam int unsigned PTR_W = AW + 2;
  localparam int unsigned RING_D = (H_MAX / 2 + LANES - 1) / LANES;

  // ---------------- VME CPLD ----------------
  logic        cmd_start, cmd_stop, cmd_dmxrst;
  trigpos_e    cfg_trigpos;
  memsize_e    cfg_memsize;
  logic        dat_req, dat_clr, dat_valid;
  logic [31:0] dat_d32;
  logic [BUS_W-1:0] bus_d;
  logic        bus_stb;

  logic             done, recording, stopping, waiting, wrapped;
  logic [PTR_W-1:0] wptr, total_words;

  // settings frozen at start
  mode_e            mode_q;
  ring_e            ring_q;
  trigpos_e         trigpos_q;
  logic [14:0]      turns_q;
  logic [TURN_W:0]  turn_words;
  logic [PTR_W-1:0] capacity;
  logic [AW-1:0]    cap_words;

  vme_slave u_vme (
    .clk, .rst,
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_iackin_n, .vme_iackout_n, .vme_d_i, .vme_d_o, .vme_d_oe,
    .vme_dtack_n, .vme_irq_n,
    .sw_base, .sw_irq_level, .sw_irq_vector,
    .st_done(done), .st_recording(recording), .st_waiting(waiting),
    .st_stopping(stopping), .st_wrapped(wrapped), .st_mode(mode_q),
    .st_ring(ring_q), .st_stopptr(32'(wptr)),
    .st_count(32'((33'(total_words) + 33'd1) >> 1)),
    .cmd_start, .cmd_stop, .cmd_dmxrst, .cfg_trigpos, .cfg_memsize,
    .cfg_delay(rf_delay_code),
    .dat_req, .dat_clr, .dat_valid, .dat_d32
  );

  pack16to32 #(.BUS_W(BUS_W)) u_pack (
    .clk, .rst, .clr(dat_clr), .stb(bus_stb), .d(bus_d), .d32(dat_d32), .valid(dat_valid)
  );

  // ADC demultiplexer reset: a 4-clock pulse per command
  logic [1:0] dmx_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      dmx_cnt     <= '0;
      adc_dmx_rst <= 1'b0;
    end else if (cmd_dmxrst) begin
      dmx_cnt     <= 2'd3;
      adc_dmx_rst <= 1'b1;
    end else if (dmx_cnt != '0) begin
      dmx_cnt <= dmx_cnt - 1'b1;
    end else begin
      adc_dmx_rst <= 1'b0;
    end
  end

  // ---------------- settings ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      mode_q    <= MODE_BUNCH;
      ring_q    <= RING_SKEKB;
      trigpos_q <= TRIG_M100;
      turns_q   <= 15'd4096;
    end else if (cmd_start) begin
      mode_q    <= sw_mode;
      ring_q    <= sw_ring;
      trigpos_q <= cfg_trigpos;
      turns_q   <= 15'(mem_turns(cfg_memsize));
    end
  end

  always_ff @(posedge clk) begin
    turn_words <= (TURN_W+1)'(harmonic(ring_q) / 2);
    capacity   <= PTR_W'(turns_q) * PTR_W'(turn_words);
    cap_words  <= AW'(capacity >> 2);
  end

  // ---------------- recording ----------------
  logic [ADC_W-1:0]  word;
  logic [TURN_W-1:0] addr;
  logic              valid, eot, arm, disarm, rec_we, flush, flush_done;

  rev_sync u_rev (
    .clk, .rst, .rev_i, .adc_i(adc_data), .turn_words, .arm, .disarm,
    .word_o(word), .addr_o(addr), .valid_o(valid), .eot_o(eot),
.waiting_o(waiting)
  );

  acq_ctrl #(.PTR_W(PTR_W)) u_acq (
    .clk, .rst, .start(cmd_start), .stop_cmd(cmd_stop), .trig_i,
    .mode(mode_q), .trigpos(trigpos_q), .turns(turns_q), .capacity,
    .valid_i(valid), .eot_i(eot), .flush_done,
    .arm, .disarm, .rec_we, .flush, .done_o(done),
    .recording_o(recording), .stopping_o(stopping),
    .wptr_o(wptr), .wrapped_o(wrapped)
  );

  logic [$clog2(RING_D)-1:0] ring_raddr;
  logic [MEM_W-1:0]          ring_rdata;

  ring_buffer u_ring (
    .clk, .we(rec_we && mode_q == MODE_BUNCH), .waddr(addr), .wdata(word),
    .raddr(ring_raddr), .rdata(ring_rdata)
  );

  // DDR2 write path
  logic             pk_valid, pk_flushed;
  logic [MEM_W-1:0] pk_data;
  logic [LANES-1:0] pk_en;
  logic             wf_pop, wf_empty, wf_full;
  logic [MEM_W+LANES-1:0] wf_dout;
  logic [$clog2(WDEPTH)+1:0] wf_count;
  logic             wcmd_valid, rcmd_valid;
  logic [AW-1:0]    wcmd_addr, rcmd_addr;
  logic             wrst;

  assign wrst = rst | cmd_start;

  sample_packer u_packer (
    .clk, .rst(wrst), .we(rec_we && mode_q == MODE_MEMORY), .word, .flush,
    .out_valid(pk_valid), .out_data(pk_data), .out_en(pk_en), .flushed(pk_flushed)
  );

  sync_fifo #(.W(MEM_W + LANES), .DEPTH(WDEPTH)) u_wbuf (
    .clk, .rst(wrst), .push(pk_valid), .din({pk_en, pk_data}), .pop(wf_pop),
    .dout(wf_dout), .empty(wf_empty), .full(wf_full), .count(wf_count)
  );

  ddr_burst_writer #(.AW(AW), .BURST(BURST), .CW($clog2(WDEPTH) + 2)) u_writer (
    .clk, .rst(wrst), .cap_words,
    .fifo_data(wf_dout[MEM_W-1:0]), .fifo_en(wf_dout[MEM_W +: LANES]),
    .fifo_empty(wf_empty), .fifo_count(wf_count), .fifo_pop(wf_pop),
    .flushed(pk_flushed), .flush_done,
    .cmd_valid(wcmd_valid), .cmd_ready(mem_cmd_ready), .cmd_addr(wcmd_addr),
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_data(mem_wr_data),
    .wr_en(mem_wr_en)
  );

  // ---------------- readout ----------------
  logic             s_valid, s_ready, s_done;
  logic [ADC_W-1:0] s_data;

  readout_engine #(.AW(AW), .PTR_W(PTR_W), .BURST(BURST), .FDEPTH(RDEPTH),
                   .RING_D(RING_D)) u_read (
    .clk, .rst, .clear(cmd_start), .go(done), .mode(mode_q), .turn_words,
    .wptr, .wrapped, .capacity, .cap_words,
    .ring_raddr, .ring_rdata,
    .rd_cmd_valid(rcmd_valid), .rd_cmd_ready(mem_cmd_ready && !wcmd_valid),
    .rd_cmd_addr(rcmd_addr), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data),
    .out_valid(s_valid), .out_data(s_data), .out_ready(s_ready),
    .exhausted(s_done), .total_words
  );

  fpga_vme_port #(.BUS_W(BUS_W)) u_port (
    .clk, .rst, .req(dat_req), .s_valid, .s_data, .s_ready, .s_done,
    .bus_d, .bus_stb
  );

  // one DDR2 user port, shared: writes while recording, reads afterwards
  assign mem_cmd_valid = wcmd_valid | rcmd_valid;
  assign mem_cmd_we    = wcmd_valid;
  assign mem_cmd_addr  = wcmd_valid ? wcmd_addr : rcmd_addr;

  a_one_user: assert property (@(posedge clk) disable iff (rst) !(wcmd_valid && rcmd_valid));

endmodule
