// tb_rev_sync: checks that the word counter locks to the first revolution
// edge after arm, labels the word that arrived with the marker as address 0,
// runs free modulo h/2 afterwards (later markers are ignored), flags the last
// word of each turn, and stops on disarm. Latency from input to output is
// checked to be three clocks.
module tb_rev_sync;
  import bcr_pkg::*;

  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst, rev_i, arm, disarm;
  logic [15:0] adc_i, word_o;
  logic [12:0] turn_words;
  logic [11:0] addr_o;
  logic valid_o, eot_o, waiting_o;
  int unsigned checks = 0, failures = 0;

  rev_sync dut (.*);

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign adc_i = 16'(cyc);            // each word carries its arrival clock

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0d", s, cyc); end
  endtask

  int unsigned rev_at;
  initial begin
    rst = 1; rev_i = 0; arm = 0; disarm = 0; turn_words = 13'd115;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(!valid_o && !waiting_o, "idle after reset");
    arm = 1; @(negedge clk); arm = 0;
    check(waiting_o, "waiting for revolution");
    repeat (17) @(negedge clk);
    check(!valid_o, "no address before the revolution edge");
    // marker present during the clock in which word rev_at arrives
    rev_at = cyc; rev_i = 1;
    @(negedge clk); rev_i = 0;
    // find first valid word: must carry rev_at and appear 3 clocks later
    @(negedge clk);
    check(!valid_o, "not valid before latency");
    @(negedge clk);
    check(valid_o && addr_o == 0 && word_o == 16'(rev_at), "address 0 is the marker word");
    check(!waiting_o, "not waiting once synchronised");
    for (int i = 1; i < 3 * 115; i++) begin
      @(negedge clk);
      check(valid_o && addr_o == 12'(i % 115) && word_o == 16'(rev_at + i), "free-running address");
      check(eot_o == (i % 115 == 114), "end of turn flag");
      // a marker at a wrong place after lock must not move the counter
      if (i == 150) rev_i = 1;
      if (i == 153) rev_i = 0;
    end
    disarm = 1; @(negedge clk); disarm = 0;
    check(!valid_o, "disarm stops the address");
    // re-arm with a different harmonic, marker held high over several clocks
    turn_words = 13'd2560;
    arm = 1; @(negedge clk); arm = 0;
    repeat (3) @(negedge clk);
    rev_at = cyc; rev_i = 1;
    repeat (20) @(negedge clk);
    rev_i = 0;
    for (int i = 3; i < 2600; i++) begin
      if (i == 3) begin
        check(valid_o && addr_o == 17 && word_o == 16'(rev_at + 17), "re-lock with long marker");
      end
      if (i > 3) check(addr_o == 12'((i + 14) % 2560) && eot_o == ((i + 14) % 2560 == 2559), "h=5120 count");
      @(negedge clk);
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
