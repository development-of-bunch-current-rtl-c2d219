// acq_ctrl: start/stop sequencer of the recorder.
//
// A start command arms the revolution synchroniser; recording begins on the
// first synchronised word. The stop signal (rising edge of the external
// trigger input, or the stop command) is latched. Recording always ends at the
// end of a turn (the last address of the ring memory):
//   bunch current mode          : at the end of the turn in which stop came;
//   memory mode, trigger -100 % : same;
//   memory mode, trigger    0 % : at the end of turn N/2 after stop;
//   memory mode, trigger  100 % : at the end of turn N after stop;
// where N is the selected memory size in turns and the turn holding the
// stop counts as the first. In memory mode the DDR2 write path is then
// flushed; after that (at once in bunch mode) `done_o` rises, which raises
// the interrupt, and nothing records until the next start.
// The ending rules follow the recorder's description; counting the stop turn
// as the first post-trigger turn is this design's reading of "half/full
// memory after the trigger".
//
// The block also keeps the memory-mode write pointer, in ADC words, modulo the
// capacity N*h/2, and reports whether it wrapped; the read side uses both to
// return the data oldest first.
module acq_ctrl
  import bcr_pkg::*;
#(
  parameter int unsigned PTR_W = $clog2(16384 * TURN_MAX)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,       // start command (pulse)
  input  logic             stop_cmd,    // stop command from VME (pulse)
  input  logic             trig_i,      // external stop trigger, asynchronous
  input  mode_e            mode,
  input  trigpos_e         trigpos,
  input  logic [14:0]      turns,       // memory size in turns (memory mode)
  input  logic [PTR_W-1:0] capacity,    // turns * h/2 ADC words
  input  logic             valid_i,     // synchronised word present
  input  logic             eot_i,       // last word of a turn
  input  logic             flush_done,  // DDR2 write path empty
  output logic             arm,         // to rev_sync
  output logic             disarm,      // to rev_sync
  output logic             rec_we,      // record the current word
  output logic             flush,       // memory mode: drain the write path
  output logic             done_o,      // recording finished (level)
  output logic             recording_o,
  output logic             stopping_o,
  output logic [PTR_W-1:0] wptr_o,      // ADC-word write pointer
  output logic             wrapped_o
);

  typedef enum logic [2:0] {S_IDLE, S_ARM, S_REC, S_STOP, S_FLUSH, S_DONE} state_e;
  state_e state;

  logic [2:0]  trig_q;
  logic        stop_evt, stop_pend;
  logic [14:0] eot_left;
  logic [14:0] post_turns;

  assign stop_evt = stop_cmd | (trig_q[1] & ~trig_q[2]);

  always_comb begin
    if (mode == MODE_BUNCH) post_turns = 15'd1;
    else case (trigpos)
      TRIG_0:    post_turns = turns >> 1;
      TRIG_P100: post_turns = turns;
      default:   post_turns = 15'd1;
    endcase
  end

  assign rec_we      = (state == S_ARM || state == S_REC || state == S_STOP) && valid_i;
  assign arm         = start;
  // last word of the final turn is on the input this cycle
  logic finish;
  assign finish = valid_i && eot_i &&
                  ((state == S_STOP && eot_left == 15'd1) ||
                   (state == S_REC && (stop_evt || stop_pend) && post_turns == 15'd1));
  assign disarm      = finish;
  assign flush       = (state == S_FLUSH);
  assign done_o      = (state == S_DONE);
  assign recording_o = (state == S_ARM || state == S_REC || state == S_STOP);
  assign stopping_o  = (state == S_STOP);

  always_ff @(posedge clk) trig_q <= {trig_q[1:0], trig_i};

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      stop_pend <= 1'b0;
      eot_left  <= '0;
      wptr_o    <= '0;
      wrapped_o <= 1'b0;
    end else if (start) begin
      state     <= S_ARM;
      stop_pend <= 1'b0;
      wptr_o    <= '0;
      wrapped_o <= 1'b0;
    end else begin
      if (rec_we && mode == MODE_MEMORY) begin
        if (wptr_o == capacity - 1'b1) begin
          wptr_o    <= '0;
          wrapped_o <= 1'b1;
        end else begin
          wptr_o <= wptr_o + 1'b1;
        end
      end
      case (state)
        S_ARM: begin
          if (stop_evt) stop_pend <= 1'b1;
          if (valid_i) state <= S_REC;
        end
        S_REC: begin
          if (stop_evt || stop_pend) begin
            state     <= S_STOP;
            stop_pend <= 1'b0;
            eot_left  <= post_turns;
            // a stop seen on the last word of a turn belongs to that turn
            if (finish) state <= (mode == MODE_MEMORY) ? S_FLUSH : S_DONE;
            else if (valid_i && eot_i) eot_left <= post_turns - 1'b1;
          end
        end
        S_STOP: begin
          if (finish) state <= (mode == MODE_MEMORY) ? S_FLUSH : S_DONE;
          else if (valid_i && eot_i) eot_left <= eot_left - 1'b1;
        end
        S_FLUSH: if (flush_done) state <= S_DONE;
        default: ;
      endcase
    end
  end

endmodule
