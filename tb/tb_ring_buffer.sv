// tb_ring_buffer: writes ADC words at random positions of a 5120-bunch turn
// (every lane of every word), then reads all memory words back and compares
// each lane with a reference array. A second pass overwrites part of the turn
// and checks that only the written lanes changed. Read latency is one clock.
module tb_ring_buffer;
  import bcr_pkg::*;

  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic we;
  logic [11:0] waddr;
  logic [15:0] wdata;
  logic [9:0] raddr;
  logic [63:0] rdata;
  logic [15:0] ref_m [2560];
  int unsigned checks = 0, failures = 0;

  ring_buffer dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic write_word(input int a, input logic [15:0] d);
    we = 1; waddr = 12'(a); wdata = d;
    @(negedge clk);
    we = 0;
    ref_m[a] = d;
  endtask

  task automatic read_all(input string s);
    int bad = 0;
    for (int i = 0; i < 640; i++) begin
      raddr = 10'(i);
      @(negedge clk);
      for (int l = 0; l < 4; l++)
        if (rdata[l*16 +: 16] !== ref_m[4*i + l]) bad++;
    end
    check(bad == 0, s);
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    // full turn in order
    for (int a = 0; a < 2560; a++) write_word(a, 16'($urandom));
    read_all("full turn");
    // random overwrite of single positions
    for (int k = 0; k < 500; k++) write_word($urandom_range(0, 2559), 16'($urandom));
    read_all("random lane overwrite");
    // latency: data of the address presented one clock before
    raddr = 10'd7; @(negedge clk);
    raddr = 10'd8;
    check(rdata[15:0] == ref_m[28], "one-clock read latency");
    @(negedge clk);
    check(rdata[15:0] == ref_m[32], "next address");
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
