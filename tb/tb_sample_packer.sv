// tb_sample_packer: feeds ADC words with random gaps and checks that every
// group of four comes out as one memory word, lowest lane first, with all
// lanes enabled; then ends a recording after 1, 2 and 3 extra words and
// checks the partial word's contents and lane enables, the absence of an
// extra word when the count was a multiple of four, and the `flushed` timing.
module tb_sample_packer;
  import bcr_pkg::*;

  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, we, flush, out_valid, flushed;
  logic [15:0] word;
  logic [63:0] out_data;
  logic [3:0] out_en;
  int unsigned checks = 0, failures = 0;

  sample_packer dut (.*);

  logic [15:0] sent[$];
  int unsigned nout = 0;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // every output word is compared with the words sent
  always @(posedge clk) if (!rst && out_valid) begin
    nout++;
    for (int l = 0; l < 4; l++) begin
      if (out_en[l]) begin
        logic [15:0] e;
        e = sent.pop_front();
        check(out_data[l*16 +: 16] == e, "lane data");
      end
    end
  end

  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      we = 1; word = 16'($urandom); sent.push_back(word);
      @(negedge clk);
      we = 0;
    end
  endtask

  task automatic session(input int n);
    int n0, expect_words;
    rst = 1; @(negedge clk); rst = 0;
    sent.delete();
    n0 = nout;
    send(n);
    repeat (3) @(negedge clk);
    check(nout - n0 == n / 4, "full words n0 flush");
    flush = 1;
    @(negedge clk);
    check(!flushed, "flushed not yet");
    @(negedge clk);
    check(flushed, "flushed two clocks after flush");
    repeat (2) @(negedge clk);
    flush = 0;
    expect_words = (n + 3) / 4;
    check(nout - n0 == expect_words, "partial word count");
    check(sent.size() == 0, "all words delivered");
  endtask

  // partial word enables
  logic [3:0] last_en;
  always @(posedge clk) if (out_valid) last_en <= out_en;

  initial begin
    rst = 1; we = 0; flush = 0; word = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    session(40);
    session(41); check(last_en == 4'b0001, "one lane enabled");
    session(42); check(last_en == 4'b0011, "two lanes enabled");
    session(43); check(last_en == 4'b0111, "three lanes enabled");
    session(44); check(last_en == 4'b1111, "no partial word on a multiple of four");
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
