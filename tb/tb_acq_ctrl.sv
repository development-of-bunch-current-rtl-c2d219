// tb_acq_ctrl: checks the start/stop sequencing. A small model of the
// revolution synchroniser supplies words (10 per turn) after each arm. For
// bunch mode and the three memory-mode trigger positions the test counts the
// turns recorded after the stop, checks that recording ends on the last word
// of a turn, that memory mode waits for the write path to drain before
// `done`, and checks the write pointer and wrap flag against the number of
// recorded words. Stops come from the trigger input and from the command;
// a stop that arrives before synchronisation is kept.
module tb_acq_ctrl;
  import bcr_pkg::*;

  localparam int TW = 10;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, start, stop_cmd, trig_i, valid_i, eot_i, flush_done;
  mode_e mode;
  trigpos_e trigpos;
  logic [14:0] turns;
  logic [25:0] capacity, wptr_o;
  logic arm, disarm, rec_we, flush, done_o, recording_o, stopping_o, wrapped_o;
  int unsigned checks = 0, failures = 0;

  acq_ctrl #(.PTR_W(26)) dut (.*);

  // synchroniser model
  int addr = 0;
  int unsigned lock_delay = 0;
  always @(posedge clk) begin
    if (arm) begin valid_i <= 0; lock_delay <= 7; end
    else if (disarm) valid_i <= 0;
    else if (lock_delay != 0) begin
      lock_delay <= lock_delay - 1;
      if (lock_delay == 1) begin valid_i <= 1; addr <= 0; end
    end else if (valid_i) addr <= (addr == TW - 1) ? 0 : addr + 1;
  end
  assign eot_i = valid_i && addr == TW - 1;

  int unsigned nwe = 0;
  int unsigned turn_ends = 0;      // eot words recorded
  always @(posedge clk) begin
    if (start) begin nwe <= 0; turn_ends <= 0; end
    else begin
      if (rec_we) nwe <= nwe + 1;
      if (rec_we && eot_i) turn_ends <= turn_ends + 1;
    end
  end

  // drain model: flush_done some clocks after flush
  int unsigned fl = 0;
  always @(posedge clk) fl <= flush ? fl + 1 : 0;
  assign flush_done = flush && fl >= 5;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  task automatic run(input mode_e m, input trigpos_e tp, input int pre_turns,
                     input bit use_trig, input int expect_post, input string name);
    int ends_at_stop, n;
    bit saw_last_word;
    mode = m; trigpos = tp;
    pulse(start);
    check(recording_o && !done_o, {name, ": recording after start"});
    while (!valid_i) @(negedge clk);
    while (turn_ends < pre_turns) @(negedge clk);
    while (addr != 4) @(negedge clk);
    ends_at_stop = turn_ends;
    if (use_trig) begin trig_i = 1; repeat (3) @(negedge clk); trig_i = 0; end
    else pulse(stop_cmd);
    n = 0;
    saw_last_word = 0;
    while (!done_o && n < 10000) begin
      if (disarm) saw_last_word = eot_i;
      @(negedge clk); n++;
    end
    check(done_o, {name, ": done"});
    check(saw_last_word, {name, ": ends on the last word of a turn"});
    check(turn_ends - ends_at_stop == expect_post, {name, ": post-stop turns"});
    check(!valid_i && !recording_o, {name, ": stopped"});
    if (m == MODE_MEMORY) begin
      check(wrapped_o == (nwe >= int'(capacity)), {name, ": wrap flag"});
      check(wptr_o == 26'(nwe % int'(capacity)), {name, ": write pointer"});
    end
    n = nwe;
    repeat (50) @(negedge clk);
    check(done_o && nwe == n, {name, ": holds until next start"});
  endtask

  // memory mode: done only after the write path reported empty
  logic done_q = 0, fd_q = 0;
  always @(posedge clk) begin
    done_q <= done_o;
    fd_q   <= flush_done;
    if (done_o && !done_q && mode == MODE_MEMORY) check(fd_q, "done after flush_done");
  end
  initial begin
    rst = 1; start = 0; stop_cmd = 0; trig_i = 0; valid_i = 0;
    mode = MODE_BUNCH; trigpos = TRIG_M100; turns = 15'd8; capacity = 26'(8 * TW);
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    check(!recording_o && !done_o, "idle");
    run(MODE_BUNCH,  TRIG_P100, 3, 1, 1, "bunch, trigger");
    run(MODE_BUNCH,  TRIG_0,    2, 0, 1, "bunch, command");
    run(MODE_MEMORY, TRIG_M100, 2, 1, 1, "memory -100%");
    run(MODE_MEMORY, TRIG_0,    2, 1, 4, "memory 0%");
    run(MODE_MEMORY, TRIG_P100, 2, 0, 8, "memory 100%");
    run(MODE_MEMORY, TRIG_M100, 12, 1, 1, "memory -100% wrapped");
    // stop before synchronisation is kept
    mode = MODE_BUNCH;
    pulse(start);
    pulse(stop_cmd);
    while (!done_o) @(negedge clk);
    check(turn_ends == 1, "early stop: one turn recorded");
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
