// tb_bcr_full: one complete recording of the main configuration at the
// design's default parameters: SuperKEKB ring (h = 5120), large scale memory
// mode with 4k turns (20 MB of DDR2), trigger position 0 %. The buffer runs
// past its end before the trigger, so the read-out must start in the middle
// of the circular region. After the interrupt, the whole memory, 2,621,440
// D32 words, is read by BLT in blocks of 64 beats and compared word by word
// with the generator's data of the last 4096 turns. The bunch current mode on
// the same ring is run first, as the board is used between injections.
module tb_bcr_full;
  import bcr_pkg::*;

  localparam logic [31:0] BASE = 32'h1234_5600;   // 512-byte aligned
  localparam logic [2:0]  IRQL = 3'd3;
  localparam logic [7:0]  IVEC = 8'h5A;

  logic clk = 1'b0;
  always #1.965 clk = ~clk;          // RF/2 = 254.4 MHz

  logic rst;
  int unsigned checks = 0, failures = 0;

  // ---------------- generator ----------------
  int unsigned h_cur = 5120;
  int unsigned b = 0;                // ADC word index in the turn
  int unsigned turn = 0;
  logic [15:0] adc_data;
  logic        rev_i, trig_i;

  function automatic logic [7:0] sample(int unsigned t, int unsigned bunch);
    return 8'((bunch * 37) ^ (t * 11) ^ (t >> 3) ^ (bunch >> 5));
  endfunction
  function automatic logic [15:0] wordf(int unsigned t, int unsigned w);
    return {sample(t, 2 * w + 1), sample(t, 2 * w)};
  endfunction

  always @(posedge clk) begin
    if (b + 1 >= h_cur / 2) begin
      b    <= 0;
      turn <= turn + 1;
    end else begin
      b <= b + 1;
    end
  end
  assign adc_data = wordf(turn, b);
  assign rev_i    = (b < 2);

  // ---------------- DUT ----------------
  mode_e sw_mode;
  ring_e sw_ring;
  logic [31:1] vme_a;
  logic [5:0]  vme_am;
  logic        vme_as_n, vme_write_n, vme_iack_n, vme_iackin_n, vme_iackout_n;
  logic [1:0]  vme_ds_n;
  logic [31:0] vme_d_m, vme_d_s;
  logic        vme_d_oe, vme_dtack_n;
  logic [7:1]  vme_irq_n;
  logic        adc_dmx_rst;
  logic [DELAY_W-1:0] rf_delay_code;
  logic        mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_wr_valid, mem_wr_ready, mem_rd_valid;
  logic [23:0] mem_cmd_addr;
  logic [63:0] mem_wr_data, mem_rd_data;
  logic [3:0]  mem_wr_en;

  bcr_top dut (
    .clk, .rst, .adc_data, .adc_dmx_rst, .rf_delay_code, .rev_i, .trig_i,
    .sw_mode, .sw_ring, .sw_base(BASE[31:9]), .sw_irq_level(IRQL), .sw_irq_vector(IVEC),
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_iackin_n, .vme_iackout_n, .vme_d_i(vme_d_m), .vme_d_o(vme_d_s), .vme_d_oe,
    .vme_dtack_n, .vme_irq_n,
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_we, .mem_cmd_addr,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_data, .mem_wr_en,
    .mem_rd_valid, .mem_rd_data
  );

  ddr2_model #(.AW(24), .BURST(32)) u_ddr (
    .clk, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready),
    .wr_data(mem_wr_data), .wr_en(mem_wr_en), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data)
  );

  vme_master vm (
    .clk, .a(vme_a), .am(vme_am), .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .iack_n(vme_iack_n), .iackin_n(vme_iackin_n), .d(vme_d_m),
    .d_slave(vme_d_oe ? vme_d_s : 32'hFFFF_FFFF), .dtack_n(vme_dtack_n)
  );

  // ---------------- mechanism counters ----------------
  int unsigned n_sync = 0, n_dmx = 0, n_wait_empty = 0, n_partial = 0, n_ddr_stall = 0;
  int unsigned n_single = 0, n_blt = 0, n_iack = 0, n_pass = 0, n_stclr = 0;
  int unsigned n_wrap = 0, n_nowrap = 0, n_m100 = 0, n_t0 = 0, n_p100 = 0;
  int unsigned n_trigstop = 0, n_cmdstop = 0, n_delay = 0, n_pastend = 0;

  always @(posedge clk) begin
    if (dut.u_rev.waiting_o && dut.u_rev.rev_q[1] && !dut.u_rev.rev_q[2]) n_sync++;
    if (adc_dmx_rst && !$past(adc_dmx_rst)) n_dmx++;
    if (dut.u_port.state == 2'd1 && !dut.u_port.s_valid && !dut.u_port.s_done) n_wait_empty++;
    if (mem_wr_valid && mem_wr_ready && mem_wr_en != 4'hF && mem_wr_en != 4'h0) n_partial++;
    if ((mem_cmd_valid || mem_wr_valid || u_ddr.busy_r) && u_ddr.refreshing) n_ddr_stall++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic rd(input logic [8:0] off, output logic [31:0] v);
    vm.read32(BASE + 32'(off), AM_A32_SUP_DATA, v);
    n_single++;
  endtask
  task automatic wr(input logic [8:0] off, input logic [31:0] v);
    vm.write32(BASE + 32'(off), AM_A32_SUP_DATA, v);
  endtask

  task automatic wait_mid_turn();
    while (b != h_cur / 4) @(negedge clk);
  endtask

  task automatic wait_irq(input int unsigned max_cycles, output bit ok);
    int unsigned n = 0;
    ok = 1;
    while (vme_irq_n[IRQL] !== 1'b0) begin
      @(negedge clk);
      n++;
      if (n > max_cycles) begin
        ok = 0;
        return;
      end
    end
  endtask

  // interrupt service as the crate software does it
  task automatic service_irq();
    logic [7:0] vec;
    bit got;
    logic [31:0] st;
    vm.iack(IRQL, vec, got);
    check(got && vec == IVEC, "interrupt vector");
    check(vme_irq_n[IRQL] === 1'b1, "IRQ released on acknowledge");
    n_iack++;
    rd(REG_STATUS, st);
    check(st[0] && st[5], "status shows finished recording");
    rd(REG_STATUS, st);
    check(!st[0], "status read clears interrupt status");
    n_stclr++;
  endtask

  // expected ADC word stream of a finished recording
  logic [15:0] exp_q[$];
  task automatic expect_turns(input int unsigned t_first, input int unsigned t_last);
    for (int unsigned t = t_first; t <= t_last; t++)
      for (int unsigned w = 0; w < h_cur / 2; w++) exp_q.push_back(wordf(t, w));
  endtask

  // read `n32` D32 words by BLT (64 beats per block) and compare
  task automatic blt_compare(input int unsigned n32, input string what);
    logic [31:0] got_q[$];
    int unsigned bad = 0;
    int unsigned done_n = 0;
    while (done_n < n32) begin
      int unsigned chunk = (n32 - done_n > 64) ? 64 : n32 - done_n;
      vm.blt_read(BASE + 32'h100 + 32'((done_n % 64) * 4), chunk, got_q);
      done_n += chunk;
      n_blt++;
    end
    for (int unsigned i = 0; i < n32; i++) begin
      logic [15:0] lo, hi;
      lo = (2 * i < exp_q.size()) ? exp_q[2 * i] : 16'h0;
      hi = (2 * i + 1 < exp_q.size()) ? exp_q[2 * i + 1] : 16'h0;
      if (got_q[i] !== {hi, lo}) begin
        bad++;
        if (bad < 5) $display("  %s word %0d: got %08h expected %08h", what, i, got_q[i], {hi, lo});
      end
    end
    check(bad == 0, what);
  endtask

  // ---------------- memory-mode run ----------------
  task automatic memory_run(input ring_e ring, input memsize_e ms, input trigpos_e tp,
                            input int unsigned pre_turns, input string name);
    int unsigned t0, tt, n, p, k, t_last, t_first;
    logic [31:0] v;
    bit ok;
    sw_mode = MODE_MEMORY;
    sw_ring = ring;
    h_cur   = harmonic(ring);
    repeat (h_cur) @(negedge clk);      // generator settles on the new ring
    wr(REG_CONFIG, {28'd0, ms, tp});
    wait_mid_turn();
    wr(REG_CONTROL, 32'h9);             // start, interrupts on
    t0 = turn + 1;
    while (turn < t0 + pre_turns) @(negedge clk);
    wait_mid_turn();
    tt = turn;
    trig_i = 1'b1;
    repeat (4) @(negedge clk);
    trig_i = 1'b0;
    n_trigstop++;
    n = mem_turns(ms);
    p = (tp == TRIG_0) ? n / 2 : (tp == TRIG_P100) ? n : 1;
    t_last = tt + p - 1;
    k = t_last - t0 + 1;
    t_first = (k >= n) ? t_last - n + 1 : t0;
    wait_irq((p + 4) * h_cur, ok);
    check(ok, {name, ": interrupt after the post-trigger turns"});
    if (!ok) return;
    check(turn == t_last + 1, {name, ": recording ended at the end of the right turn"});
    // read a word at once, while the read FIFO is still filling
    exp_q.delete();
    expect_turns(t_first, t_last);
    begin
      logic [31:0] q[$];
      vm.blt_read(BASE + 32'h100, 1, q);
      check(q[0] === {exp_q[1], exp_q[0]}, {name, ": first word"});
      void'(exp_q.pop_front());
      void'(exp_q.pop_front());
    end
    service_irq();
    rd(REG_STATUS, v);
    check(v[4] == (k >= n), {name, ": wrapped flag"});
    if (k >= n) n_wrap++; else n_nowrap++;
    rd(REG_COUNT, v);
    check(v == (exp_q.size() + 2 + 1) / 2, {name, ": word count"});
    blt_compare((exp_q.size() + 1) / 2, {name, ": data"});
    if (tp == TRIG_M100) n_m100++;
    if (tp == TRIG_0) n_t0++;
    if (tp == TRIG_P100) n_p100++;
  endtask

  // ---------------- main ----------------
  initial begin
    logic [31:0] v;
    bit ok;
    int unsigned tt;
    rst = 1'b1; trig_i = 1'b0;
    sw_mode = MODE_BUNCH; sw_ring = RING_SKEKB;
    repeat (10) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);

    // bunch current mode, h = 5120
    wait_mid_turn();
    wr(REG_CONTROL, 32'h9);
    repeat (3 * 2560) @(negedge clk);
    wait_mid_turn();
    tt = turn;
    trig_i = 1'b1;
    repeat (3) @(negedge clk);
    trig_i = 1'b0;
    wait_irq(2 * 2560, ok);
    check(ok && turn == tt + 1, "bunch mode stops at the end of the turn");
    service_irq();
    exp_q.delete();
    expect_turns(tt, tt);
    blt_compare(1280, "bunch mode data");

    // large scale memory mode, 4k turns, trigger 0 %
    memory_run(RING_SKEKB, MEM_4K, TRIG_0, 2100, "SuperKEKB 4k turns 0%");
    check(n_wrap == 1, "buffer wrapped before the stop");
    check(vm.timeouts == 0, "no VME bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
