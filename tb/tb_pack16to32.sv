// tb_pack16to32: sends random 32-bit words as two 16-bit pieces (and, in a
// second instance, four 8-bit pieces) with random gaps between strobes,
// checking that `valid` rises only after the last piece, that d32 holds the
// word, and that `clr` realigns after a partial word.
module tb_pack16to32;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, clr, stb16, stb8, valid16, valid8;
  logic [15:0] d16;
  logic [7:0] d8;
  logic [31:0] q16, q8;
  int unsigned checks = 0, failures = 0;

  pack16to32              u16 (.clk, .rst, .clr, .stb(stb16), .d(d16), .d32(q16), .valid(valid16));
  pack16to32 #(.BUS_W(8)) u8  (.clk, .rst, .clr, .stb(stb8),  .d(d8),  .d32(q8),  .valid(valid8));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic send(input logic [31:0] w);
    for (int p = 0; p < 4; p++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      stb8 = 1; d8 = w[8*p +: 8];
      if (p % 2 == 0) begin stb16 = 1; d16 = w[16*(p/2) +: 16]; end
      @(negedge clk);
      stb8 = 0; stb16 = 0;
      if (p == 0) check(!valid16 && !valid8, "not valid after first piece");
      if (p == 2) check(valid16 && q16 == w, "16-bit word complete");
      if (p < 3)  check(!valid8, "8-bit not complete early");
    end
    check(valid8 && q8 == w && valid16 && q16 == w, "words held");
  endtask

  initial begin
    rst = 1; clr = 0; stb16 = 0; stb8 = 0; d16 = 0; d8 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 50; k++) begin
      clr = 1; @(negedge clk); clr = 0;
      check(!valid16 && !valid8, "clr drops valid");
      send($urandom);
    end
    // a stray piece, then clr: the next word must still align
    stb16 = 1; stb8 = 1; d16 = 16'hDEAD; d8 = 8'hAD; @(negedge clk); stb16 = 0; stb8 = 0;
    clr = 1; @(negedge clk); clr = 0;
    send(32'h1234_5678);
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
