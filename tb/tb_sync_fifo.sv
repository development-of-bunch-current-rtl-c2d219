// tb_sync_fifo: random pushes and pops against a queue model at a small
// depth, checking data order, empty/full flags and the occupancy count, then
// a full fill to DEPTH and drain, and the reset that empties the FIFO.
module tb_sync_fifo;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  localparam int D = 16;
  logic rst, push, pop, empty, full;
  logic [11:0] din, dout;
  logic [5:0] count;
  logic [11:0] q[$];
  int unsigned checks = 0, failures = 0;

  sync_fifo #(.W(12), .DEPTH(D)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      bit p, r;
      p = ($urandom_range(0, 99) < (i < 1500 ? 60 : 40)) && !full;
      r = ($urandom_range(0, 99) < 50) && !empty;
      if (r) check(dout == q[0], "data order");
      push = p; pop = r; din = 12'($urandom);
      if (p) q.push_back(din);
      if (r) void'(q.pop_front());
      @(negedge clk);
      push = 0; pop = 0;
      check(count == 6'(q.size()), "count");
      check(!full || q.size() >= D, "full only near capacity");
      check(full || q.size() <= D, "full at capacity");
    end
    // drain
    while (!empty) begin
      check(dout == q.pop_front(), "drain order");
      pop = 1; @(negedge clk); pop = 0;
    end
    check(q.size() == 0, "model empty at the end");
    // fill completely
    for (int i = 0; i < D + 1; i++) begin
      push = 1; din = 12'(i); @(negedge clk);
    end
    push = 0;
    @(negedge clk);
    check(count == D + 1 && full, "holds DEPTH plus output register");
    rst = 1; @(negedge clk); rst = 0;
    check(empty && count == 0, "reset empties");
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
