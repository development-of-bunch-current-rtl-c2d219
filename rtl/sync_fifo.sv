// sync_fifo: single-clock first-in first-out buffer in block RAM.
//
// Used twice: as the block-RAM buffer in front of the DDR2 burst writer, and
// as the long read FIFO that rides out DDR2 refresh gaps while VME reads.
// Show-ahead output: dout holds the oldest entry whenever empty is low, and
// `pop` removes it. The storage is read one clock ahead into an output
// register, so the array maps to a block RAM with a registered read port.
// Pushing when full or popping when empty is a usage error (asserted).
// `count` gives the occupancy including the output register.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512     // power of two
) (
  input  logic                     clk,
  input  logic                     rst,    // also empties the FIFO
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH)+1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;          // array pointers
  logic          ovalid;          // output register holds an entry
  logic          arr_empty, load;
  logic [AW:0]   arr_count;

  assign arr_count = wp - rp;
  assign arr_empty = (arr_count == '0);
  assign full      = (arr_count == (AW+1)'(DEPTH));
  assign empty     = !ovalid;
  assign count     = {1'b0, arr_count} + {{(AW+1){1'b0}}, ovalid};
  // refill the output register when it is empty or being popped
  assign load      = !arr_empty && (!ovalid || pop);

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp[AW-1:0]] <= din;
    if (load) dout <= mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp     <= '0;
      rp     <= '0;
      ovalid <= 1'b0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (load) begin
        rp     <= rp + 1'b1;
        ovalid <= 1'b1;
      end else if (pop) begin
        ovalid <= 1'b0;
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
