// fpga_vme_port: FPGA end of the narrow data bus towards the VME data lines.
//
// The FPGA card does not reach the 32-bit VME data bus directly. For each
// request from the VME CPLD (`req`, one clock) this block takes the next two
// ADC words (four bunches) from the readout stream, forms the 32-bit word
// {second, first}, and sends it as 32/BUS_W pieces, lowest first, on `bus_d`
// with one `bus_stb` clock per piece; a converter on the board reassembles
// the 32-bit word. Once the stream is exhausted the missing words read as 0,
// so a reader that runs past the end does not hang the bus.
// A narrow strobed bus multiplexed into D32 follows the recorder's
// description; the piece order and the 0 fill are this design's choices.
// Latency: first strobe two clocks after req if the stream is ready.
module fpga_vme_port
  import bcr_pkg::*;
#(
  parameter int unsigned BUS_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             req,
  // readout stream
  input  logic             s_valid,
  input  logic [ADC_W-1:0] s_data,
  output logic             s_ready,
  input  logic             s_done,       // stream exhausted
  // narrow bus
  output logic [BUS_W-1:0] bus_d,
  output logic             bus_stb
);

  localparam int unsigned NPIECE = 32 / BUS_W;

  typedef enum logic [1:0] {P_IDLE, P_GET, P_SEND} pstate_e;
  pstate_e state;

  logic [31:0] sh;
  logic        half;                      // second ADC word being fetched
  logic [$clog2(NPIECE+1)-1:0] sent;

  assign s_ready = (state == P_GET) && s_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= P_IDLE;
      sh      <= '0;
      half    <= 1'b0;
      sent    <= '0;
      bus_stb <= 1'b0;
      bus_d   <= '0;
    end else begin
      bus_stb <= 1'b0;
      case (state)
        P_IDLE: if (req) begin
          state <= P_GET;
          half  <= 1'b0;
        end
        P_GET: begin
          if (s_valid || s_done) begin
            sh    <= {(s_valid ? s_data : ADC_W'(0)), sh[31:16]};
            half  <= 1'b1;
            if (half) begin
              state <= P_SEND;
              sent  <= '0;
            end
          end
        end
        P_SEND: begin
          bus_stb <= 1'b1;
          bus_d   <= sh[BUS_W-1:0];
          sh      <= sh >> BUS_W;
          sent    <= sent + 1'b1;
          if (sent == ($clog2(NPIECE+1))'(NPIECE - 1)) state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
