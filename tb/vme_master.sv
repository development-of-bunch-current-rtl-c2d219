// vme_master: simulation model of a VME bus master (the crate's CPU board)
// for the recorder's testbenches. Not synthesizable.
//
// Tasks drive the bus the way a VME64 master does, one clock step at a time
// on the falling edge of `clk`: address, AM and LWORD* are set up, AS* falls,
// then DS0*/DS1*; the task waits for DTACK*, samples data, releases DS*,
// waits for DTACK* to rise and finally releases AS*. Block transfers (BLT)
// keep AS* low while DS* cycles. The interrupt acknowledge task drives
// IACK*, puts the level on A[3:1] and starts the IACKIN* daisy chain.
// `timeouts` counts handshakes that never completed (bus error).
module vme_master #(
  parameter int unsigned TMO = 4000      // clocks before a bus error
) (
  input  logic        clk,
  output logic [31:1] a,
  output logic [5:0]  am,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        iack_n,
  output logic        iackin_n,
  output logic [31:0] d,
  input  logic [31:0] d_slave,
  input  logic        dtack_n
);

  int unsigned timeouts = 0;
  int unsigned tmo_now  = TMO;    // may be shortened by the testbench
  int unsigned last_wait = 0;     // clocks from DS* to DTACK* in the last beat

  initial begin
    a = '0; am = '0; as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1;
    iack_n = 1'b1; iackin_n = 1'b1; d = '0;
  end

  task automatic wait_dtack(input logic level, output bit ok);
    int unsigned n = 0;
    ok = 1;
    while (dtack_n !== level) begin
      @(negedge clk);
      n++;
      if (n > tmo_now) begin
        ok = 0;
        timeouts++;
        return;
      end
    end
    last_wait = n;
  endtask

  task automatic beat(output logic [31:0] data);
    bit ok;
    int unsigned w;
    ds_n = 2'b00;
    @(negedge clk);
    wait_dtack(1'b0, ok);
    w = last_wait;
    data = d_slave;
    ds_n = 2'b11;
    @(negedge clk);
    if (ok) wait_dtack(1'b1, ok);
    last_wait = w;
  endtask

  task automatic read32(input logic [31:0] addr, input logic [5:0] amc, output logic [31:0] data);
    @(negedge clk);
    a = addr[31:1]; am = amc; write_n = 1'b1; iack_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    beat(data);
    as_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
  endtask

  task automatic write32(input logic [31:0] addr, input logic [5:0] amc, input logic [31:0] data);
    logic [31:0] dummy;
    @(negedge clk);
    a = addr[31:1]; am = amc; write_n = 1'b0; iack_n = 1'b1; d = data;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    beat(dummy);
    as_n = 1'b1;
    write_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
  endtask

  // n beats of a block transfer into buf[first ...]
  task automatic blt_read(input logic [31:0] addr, input int unsigned n,
                          ref logic [31:0] buf_q[$]);
    logic [31:0] data;
    @(negedge clk);
    a = addr[31:1]; am = 6'h0F; write_n = 1'b1; iack_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    for (int unsigned i = 0; i < n; i++) begin
      beat(data);
      buf_q.push_back(data);
      a = '1;                    // address lines are invalid after the first beat
    end
    as_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
  endtask

  task automatic iack(input logic [2:0] level, output logic [7:0] vector, output bit got);
    logic [31:0] data;
    bit ok;
    @(negedge clk);
    a = '0; a[3:1] = level; am = 6'h0D; write_n = 1'b1; iack_n = 1'b0;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    ds_n = 2'b10;                // D08(O) acknowledge on DS0*
    iackin_n = 1'b0;
    @(negedge clk);
    wait_dtack(1'b0, ok);
    got    = ok;
    vector = d_slave[7:0];
    ds_n = 2'b11;
    iackin_n = 1'b1;
    @(negedge clk);
    if (ok) wait_dtack(1'b1, ok);
    as_n = 1'b1;
    iack_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
  endtask

endmodule
