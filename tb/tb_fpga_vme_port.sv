// tb_fpga_vme_port: for the 16-bit bus (default) and the 8-bit variant,
// requests 32-bit words from a stream source that is sometimes not ready and
// checks the pieces on the bus, lowest first, one strobe per piece, that each
// request takes exactly two stream words, and that words past the end of the
// stream read as 0 without waiting.
module tb_fpga_vme_port;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic rst;
  int unsigned checks = 0, failures = 0;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s k idx16=%0d", s, idx16); end
  endtask

  // two instances: 16-bit and 8-bit bus, each with its own source
  logic        req16, req8;
  logic        v16, v8, r16, r8, d16, d8;
  logic [15:0] s16, s8;
  logic [15:0] bus16;
  logic [7:0]  bus8;
  logic        stb16, stb8;
  int unsigned idx16 = 0, idx8 = 0;
  int unsigned len = 21;        // stream length in ADC words
  logic        gate16, gate8;

  fpga_vme_port #(.BUS_W(16)) u16 (.clk, .rst, .req(req16), .s_valid(v16), .s_data(s16),
                                   .s_ready(r16), .s_done(d16), .bus_d(bus16), .bus_stb(stb16));
  fpga_vme_port #(.BUS_W(8))  u8  (.clk, .rst, .req(req8), .s_valid(v8), .s_data(s8),
                                   .s_ready(r8), .s_done(d8), .bus_d(bus8), .bus_stb(stb8));

  function automatic logic [15:0] sw(int unsigned i); return 16'(i * 4097 + 3); endfunction

  assign v16 = gate16 && idx16 < len;
  assign d16 = idx16 >= len;
  assign s16 = sw(idx16);
  assign v8  = gate8 && idx8 < len;
  assign d8  = idx8 >= len;
  assign s8  = sw(idx8);
  always @(posedge clk) begin
    gate16 <= ($urandom_range(0, 2) != 0);
    gate8  <= ($urandom_range(0, 2) != 0);
    if (r16 && !rst) idx16 <= idx16 + 1;
    if (r8 && !rst)  idx8  <= idx8 + 1;
  end

  task automatic get16(output logic [31:0] w, output int cyc);
    int n = 0;
    cyc = 0;
    req16 = 1; @(negedge clk); req16 = 0;
    while (n < 2 && cyc < 200) begin
      if (stb16) begin w = {bus16, w[31:16]}; n++; end
      @(negedge clk); cyc++;
    end
  endtask
  task automatic get8(output logic [31:0] w);
    int n = 0, cyc = 0;
    req8 = 1; @(negedge clk); req8 = 0;
    while (n < 4 && cyc < 200) begin
      if (stb8) begin w = {bus8, w[31:8]}; n++; end
      @(negedge clk); cyc++;
    end
  endtask

  initial begin
    logic [31:0] w;
    int cyc;
    rst = 1; req16 = 0; req8 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 13; k++) begin
      logic [15:0] lo, hi;
      lo = (2 * k < len) ? sw(2 * k) : 16'h0;
      hi = (2 * k + 1 < len) ? sw(2 * k + 1) : 16'h0;
      get16(w, cyc);
      check(w == {hi, lo}, $sformatf("16-bit bus word k=%0d got %h exp %h", k, w, {hi, lo}));
      check(idx16 == ((2 * k + 2 < len) ? 2 * k + 2 : len), "two stream words per request");
      if (2 * k >= len) check(cyc <= 6, "past the end answers at once");
      get8(w);
      check(w == {hi, lo}, "8-bit bus word");
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
