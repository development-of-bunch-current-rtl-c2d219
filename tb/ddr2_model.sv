// ddr2_model: behavioural model of a DDR2 memory behind its controller's
// user port, for simulation only (not synthesizable).
//
// Accepts one burst command at a time (BURST memory words). A write command
// then takes BURST data beats, each lane written only where its enable bit
// is set; a read command returns BURST beats in order, starting LAT clocks
// after the command. Every REF_PERIOD clocks the model pauses for REF_LEN
// clocks (cmd_ready and wr_ready low), like a refresh. Storage is sparse
// (associative array); unwritten words read as 0. Counters report how many
// refresh pauses actually stalled a transfer.
module ddr2_model
  import bcr_pkg::*;
#(
  parameter int unsigned AW         = 24,
  parameter int unsigned BURST      = 32,
  parameter int unsigned LAT        = 8,
  parameter int unsigned REF_PERIOD = 780,
  parameter int unsigned REF_LEN    = 30
) (
  input  logic             clk,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic             cmd_we,
  input  logic [AW-1:0]    cmd_addr,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [MEM_W-1:0] wr_data,
  input  logic [LANES-1:0] wr_en,
  output logic             rd_valid,
  output logic [MEM_W-1:0] rd_data
);

  logic [MEM_W-1:0] mem [bit [AW-1:0]];

  int unsigned tick = 0;
  int unsigned ref_stalls = 0;
  int unsigned writes = 0, reads = 0;
  logic        refreshing;
  logic        busy_w = 1'b0, busy_r = 1'b0;
  logic [AW-1:0] addr;
  int unsigned beat = 0;
  int unsigned wait_cnt = 0;

  assign refreshing = (tick % REF_PERIOD) < REF_LEN;
  assign cmd_ready  = !refreshing && !busy_w && !busy_r;
  assign wr_ready   = !refreshing && busy_w;

  initial begin
    rd_valid = 1'b0;
    rd_data  = '0;
  end

  always @(posedge clk) begin
    tick <= tick + 1;
    rd_valid <= 1'b0;
    if (refreshing && (busy_w || busy_r || cmd_valid) && (tick % REF_PERIOD) == 0)
      ref_stalls <= ref_stalls + 1;
    if (cmd_valid && cmd_ready) begin
      addr <= cmd_addr;
      beat <= 0;
      if (cmd_we) begin
        busy_w <= 1'b1;
        writes <= writes + 1;
      end else begin
        busy_r   <= 1'b1;
        wait_cnt <= LAT;
        reads    <= reads + 1;
      end
    end
    if (busy_w && wr_valid && wr_ready) begin
      logic [MEM_W-1:0] w;
      w = mem.exists(addr + AW'(beat)) ? mem[addr + AW'(beat)] : '0;
      for (int l = 0; l < LANES; l++)
        if (wr_en[l]) w[l*ADC_W +: ADC_W] = wr_data[l*ADC_W +: ADC_W];
      mem[addr + AW'(beat)] = w;
      beat <= beat + 1;
      if (beat == BURST - 1) busy_w <= 1'b0;
    end
    if (busy_r) begin
      if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      else if (!refreshing) begin
        rd_valid <= 1'b1;
        rd_data  <= mem.exists(addr + AW'(beat)) ? mem[addr + AW'(beat)] : '0;
        beat     <= beat + 1;
        if (beat == BURST - 1) busy_r <= 1'b0;
      end
    end
  end

endmodule
