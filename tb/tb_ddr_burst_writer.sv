// tb_ddr_burst_writer: streams memory words through a write buffer into the
// DDR2 model (burst of 4, refresh pauses) and checks: every command starts on
// a burst boundary of the circular region and wraps at cap_words; no burst is
// started before the buffer holds a full burst; after the end of recording
// the remainder is written as a padded burst whose extra beats write nothing;
// flush_done comes only when the buffer is empty; and the final memory
// contents equal the last words written to each address.
module tb_ddr_burst_writer;
  import bcr_pkg::*;

  localparam int B = 4, CAP = 32;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, push, pop, empty, full, flushed, flush_done;
  logic [67:0] din, dout;
  logic [6:0] count;
  logic cmd_valid, cmd_ready, wr_valid, wr_ready, rd_valid;
  logic [23:0] cmd_addr;
  logic [63:0] wr_data, rd_data;
  logic [3:0] wr_en;
  int unsigned checks = 0, failures = 0;

  sync_fifo #(.W(68), .DEPTH(32)) u_buf (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);
  ddr_burst_writer #(.AW(24), .BURST(B), .CW(7)) dut (
    .clk, .rst, .cap_words(24'(CAP)), .fifo_data(dout[63:0]), .fifo_en(dout[67:64]),
    .fifo_empty(empty), .fifo_count(count), .fifo_pop(pop), .flushed, .flush_done,
    .cmd_valid, .cmd_ready, .cmd_addr, .wr_valid, .wr_ready, .wr_data, .wr_en);
  ddr2_model #(.AW(24), .BURST(B), .REF_PERIOD(50), .REF_LEN(7)) u_ddr (
    .clk, .cmd_valid, .cmd_ready, .cmd_we(1'b1), .cmd_addr, .wr_valid, .wr_ready,
    .wr_data, .wr_en, .rd_valid, .rd_data);

  logic [63:0] expect_m [CAP];
  int unsigned ncmd = 0;
  logic [23:0] exp_addr = 0;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (!rst && cmd_valid && cmd_ready) begin
    check(cmd_addr == exp_addr, "burst address");
    check(count >= B || flushed, "full burst buffered before command");
    exp_addr <= (exp_addr + B >= CAP) ? 0 : exp_addr + B;
    ncmd++;
  end

  initial begin
    int n = 0;
    rst = 1; push = 0; din = 0; flushed = 0;
    for (int i = 0; i < CAP; i++) expect_m[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // 81 words: wraps the 32-word region twice and leaves one partial burst
    while (n < 81) begin
      if (!full && $urandom_range(0, 3) != 0) begin
        push = 1;
        din = {4'hF, 32'($urandom), 32'(n)};
        expect_m[n % CAP] = din[63:0];
        n++;
      end else push = 0;
      @(negedge clk);
    end
    push = 0;
    repeat (200) @(negedge clk);
    check(ncmd == 20, "only full bursts before the end");
    check(!flush_done, "no flush_done before the end");
    flushed = 1;
    while (!flush_done) @(negedge clk);
    check(ncmd == 21, "one padded burst at the end");
    check(empty && count == 0, "buffer empty at flush_done");
    for (int a = 0; a < CAP; a++) begin
      logic [63:0] m;
      m = u_ddr.mem.exists(24'(a)) ? u_ddr.mem[24'(a)] : 64'h0;
      check(m == expect_m[a], $sformatf("memory word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
