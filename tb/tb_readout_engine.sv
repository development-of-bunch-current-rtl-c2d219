// tb_readout_engine: checks the read path with a small long-FIFO (16 words)
// and bursts of 4 against a ring memory model and the DDR2 model (refresh
// pauses, read latency). Cases: bunch mode (115 words from bunch 0), memory
// mode not wrapped (words 0 .. pointer-1), and memory mode wrapped (from the
// pointer to the end of the region, then from 0, with a start that is not
// burst aligned). The consumer takes words at random times; every word, the
// word count and the `exhausted` flag are compared, and no read command may
// be issued without FIFO room for its whole burst.
module tb_readout_engine;
  import bcr_pkg::*;

  localparam int B = 4, FD = 16;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, clear, go, wrapped;
  mode_e mode;
  logic [12:0] turn_words;
  logic [25:0] wptr, capacity, total_words;
  logic [23:0] cap_words;
  logic [9:0] ring_raddr;
  logic [63:0] ring_rdata, rd_data;
  logic rd_cmd_valid, rd_cmd_ready, rd_valid, out_valid, out_ready, exhausted;
  logic [23:0] rd_cmd_addr;
  logic [15:0] out_data;
  int unsigned checks = 0, failures = 0;

  readout_engine #(.AW(24), .PTR_W(26), .BURST(B), .FDEPTH(FD)) dut (.*);
  ddr2_model #(.AW(24), .BURST(B), .LAT(5), .REF_PERIOD(60), .REF_LEN(9)) u_ddr (
    .clk, .cmd_valid(rd_cmd_valid), .cmd_ready(rd_cmd_ready), .cmd_we(1'b0),
    .cmd_addr(rd_cmd_addr), .wr_valid(1'b0), .wr_ready(), .wr_data(64'h0), .wr_en(4'h0),
    .rd_valid, .rd_data);

  function automatic logic [15:0] ringw(int i); return 16'(i * 5 + 1000); endfunction
  function automatic logic [15:0] ddrw(int i);  return 16'(i * 3 + 7); endfunction

  always @(posedge clk)
    ring_rdata <= {ringw(4 * ring_raddr + 3), ringw(4 * ring_raddr + 2),
                   ringw(4 * ring_raddr + 1), ringw(4 * ring_raddr)};

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rd_cmd_valid && rd_cmd_ready)
    check(int'(dut.f_count) + int'(dut.inflight) + B <= FD, "FIFO room for the burst");

  logic [15:0] exp_q[$];
  task automatic run(input string name);
    int n = 0, bad = 0;
    int guard = 0;
    clear = 1; @(negedge clk); clear = 0;
    go = 1;
    while (!exhausted && guard < 20000) begin
      out_ready = ($urandom_range(0, 2) != 0);
      if (out_valid && out_ready) begin
        if (out_data !== exp_q[n]) bad++;
        n++;
      end
      @(negedge clk);
      guard++;
    end
    out_ready = 0;
    go = 0;
    check(bad == 0, {name, ": data"});
    check(n == exp_q.size(), {name, ": word count"});
    check(int'(total_words) == exp_q.size(), {name, ": total_words"});
    repeat (30) @(negedge clk);
    check(!out_valid, {name, ": nothing after the end"});
  endtask

  initial begin
    rst = 1; clear = 0; go = 0; out_ready = 0; wrapped = 0; mode = MODE_BUNCH;
    turn_words = 13'd115; wptr = 0; capacity = 26'd128; cap_words = 24'd32;
    for (int a = 0; a < 32; a++)
      u_ddr.mem[24'(a)] = {ddrw(4 * a + 3), ddrw(4 * a + 2), ddrw(4 * a + 1), ddrw(4 * a)};
    repeat (3) @(negedge clk);
    rst = 0;
    // bunch mode
    exp_q.delete();
    for (int i = 0; i < 115; i++) exp_q.push_back(ringw(i));
    run("bunch mode");
    // memory mode, not wrapped
    mode = MODE_MEMORY; wptr = 26'd37; wrapped = 0;
    exp_q.delete();
    for (int i = 0; i < 37; i++) exp_q.push_back(ddrw(i));
    run("memory, not wrapped");
    // memory mode, wrapped, start not burst aligned
    wptr = 26'd45; wrapped = 1;
    exp_q.delete();
    for (int i = 45; i < 128; i++) exp_q.push_back(ddrw(i));
    for (int i = 0; i < 45; i++) exp_q.push_back(ddrw(i));
    run("memory, wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
