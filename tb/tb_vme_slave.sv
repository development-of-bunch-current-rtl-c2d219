// tb_vme_slave: drives the VME CPLD with the bus master model and checks:
// register writes and read-back, command pulses, status bits, the interrupt
// raised by the end of a recording (only when enabled), the ROAK acknowledge
// returning the switch vector and releasing IRQ*, pass-through of an
// acknowledge for another level, status-read clear, D32 reads of the ADC data
// window, BLT reads anywhere in the 256-byte data area with the address
// ignored, DTACK* held off until the data word is ready, and no response to a
// foreign base address, an unsupported AM code, or BLT outside the data area.
module tb_vme_slave;
  import bcr_pkg::*;

  localparam logic [31:0] BASE = 32'hA000_0200;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst;
  logic [31:1] vme_a;
  logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_iack_n, vme_iackin_n, vme_iackout_n, vme_d_oe, vme_dtack_n;
  logic [1:0] vme_ds_n;
  logic [31:0] vme_d_i, vme_d_o;
  logic [7:1] vme_irq_n;
  logic st_done, st_recording, st_waiting, st_stopping, st_wrapped;
  logic cmd_start, cmd_stop, cmd_dmxrst, dat_req, dat_clr, dat_valid;
  trigpos_e cfg_trigpos;
  memsize_e cfg_memsize;
  logic [9:0] cfg_delay;
  logic [31:0] dat_d32;
  int unsigned checks = 0, failures = 0;

  vme_slave dut (
    .clk, .rst, .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_iackin_n, .vme_iackout_n, .vme_d_i, .vme_d_o, .vme_d_oe, .vme_dtack_n, .vme_irq_n,
    .sw_base(BASE[31:9]), .sw_irq_level(3'd2), .sw_irq_vector(8'hC3),
    .st_done, .st_recording, .st_waiting, .st_stopping, .st_wrapped,
    .st_mode(MODE_MEMORY), .st_ring(RING_PF), .st_stopptr(32'h0001_2345), .st_count(32'd777),
    .cmd_start, .cmd_stop, .cmd_dmxrst, .cfg_trigpos, .cfg_memsize, .cfg_delay,
    .dat_req, .dat_clr, .dat_valid, .dat_d32);

  vme_master vm (.clk, .a(vme_a), .am(vme_am), .as_n(vme_as_n), .ds_n(vme_ds_n),
                 .write_n(vme_write_n), .iack_n(vme_iack_n), .iackin_n(vme_iackin_n),
                 .d(vme_d_i), .d_slave(vme_d_oe ? vme_d_o : 32'hFFFF_FFFF), .dtack_n(vme_dtack_n));

  // data source: answers each request after `lat` clocks with the next value
  int unsigned seq = 0, lat = 3, nreq = 0;
  int unsigned cnt = 0;
  logic pending = 0;
  always @(posedge clk) begin
    if (dat_clr) dat_valid <= 0;
    if (dat_req) begin pending <= 1; cnt <= lat; nreq <= nreq + 1; end
    else if (pending) begin
      if (cnt == 0) begin
        pending <= 0; dat_valid <= 1; dat_d32 <= 32'hD000_0000 + 32'(seq); seq <= seq + 1;
      end else cnt <= cnt - 1;
    end
  end

  int unsigned n_start = 0, n_stop = 0, n_dmx = 0;
  always @(posedge clk) begin
    if (!rst && cmd_start) n_start++;
    if (!rst && cmd_stop) n_stop++;
    if (!rst && cmd_dmxrst) n_dmx++;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [31:0] v;
    logic [31:0] q[$];
    logic [7:0] vec;
    bit got, seen;
    int unsigned t0;
    rst = 1; st_done = 0; st_recording = 0; st_waiting = 0; st_stopping = 0; st_wrapped = 0;
    dat_valid = 0; dat_d32 = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    vm.write32(BASE + 32'h008, 6'h0D, 32'h5);          // trigger 0 %, 8k turns
    check(cfg_trigpos == TRIG_0 && cfg_memsize == MEM_8K, "config outputs");
    vm.read32(BASE + 32'h008, 6'h0D, v);
    check(v == 32'h5, "config read-back");
    vm.write32(BASE + 32'h00C, 6'h0D, 32'h3FF);
    vm.read32(BASE + 32'h00C, 6'h0D, v);
    check(v == 32'h3FF && cfg_delay == 10'h3FF, "delay register");
    vm.write32(BASE + 32'h004, 6'h0D, 32'h5);           // start + demux reset, irq off
    check(n_start == 1 && n_dmx == 1 && n_stop == 0, "command pulses");
    vm.write32(BASE + 32'h004, 6'h0D, 32'h2);
    check(n_stop == 1 && n_start == 1, "stop pulse");
    st_recording = 1; st_waiting = 1;
    vm.read32(BASE + 32'h000, 6'h0D, v);
    check(v[1] && v[2] && !v[0] && v[8] && v[10:9] == 2'd2, "status bits");
    vm.read32(BASE + 32'h010, 6'h0D, v);
    check(v == 32'h0001_2345, "stop pointer");
    vm.read32(BASE + 32'h014, 6'h0D, v);
    check(v == 777, "word count");

    // end of recording without interrupt enable: flag only
    st_recording = 0; st_waiting = 0; st_done = 1;
    repeat (5) @(negedge clk);
    check(vme_irq_n == 7'h7F, "no IRQ when disabled");
    vm.read32(BASE + 32'h000, 6'h0D, v);
    check(v[0] && v[5], "done flag set");
    vm.read32(BASE + 32'h000, 6'h0D, v);
    check(!v[0], "done flag cleared by status read");

    // with interrupts on
    st_done = 0;
    vm.write32(BASE + 32'h004, 6'h0D, 32'h8);
    st_done = 1;
    repeat (5) @(negedge clk);
    check(vme_irq_n == 7'b1111101, "IRQ2 asserted");
    seen = 0;
    vm.tmo_now = 40;
    fork
      vm.iack(3'd4, vec, got);
      repeat (40) begin @(negedge clk); if (!vme_iackout_n) seen = 1; end
    join
    vm.tmo_now = 4000;
    check(!got && seen && vme_irq_n[2] == 0, "foreign acknowledge passed on");
    vm.iack(3'd2, vec, got);
    check(got && vec == 8'hC3, "vector");
    check(vme_irq_n == 7'h7F, "IRQ released on acknowledge");
    vm.read32(BASE + 32'h000, 6'h0D, v);
    check(v[0], "status still shows done after ROAK");

    // ADC data window, single cycles
    seq = 0;
    for (int i = 0; i < 5; i++) begin
      vm.read32(BASE + 32'h100, 6'h0D, v);
      check(v == 32'hD000_0000 + 32'(i), "data window word");
    end
    lat = 40;
    vm.read32(BASE + 32'h100, 6'h0D, v);
    check(v == 32'hD000_0005 && vm.last_wait > 40, $sformatf("DTACK waits for the data word %0d %h", vm.last_wait, v));
    lat = 1;
    // BLT anywhere in the data area, address ignored
    q.delete();
    vm.blt_read(BASE + 32'h1C0, 16, q);
    for (int i = 0; i < 16; i++) check(q[i] == 32'hD000_0006 + 32'(i), "BLT beat");
    // no answer: foreign base, wrong AM, BLT on registers
    t0 = vm.timeouts;
    vm.tmo_now = 60;
    vm.read32(BASE + 32'h200, 6'h0D, v);
    vm.read32(BASE + 32'h100, 6'h09, v);
    q.delete();
    vm.blt_read(BASE + 32'h000, 1, q);
    vm.tmo_now = 4000;
    check(vm.timeouts - t0 == 3, "no response outside the supported accesses");
    check(nreq == 6 + 16, "data requests counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
