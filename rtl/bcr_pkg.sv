// bcr_pkg: types and constants shared by the bunch current / oscillation
// recorder. The harmonic numbers (5120, 640, 312, 230), the three trigger
// positions (-100 %, 0 %, 100 %) and the three memory sizes (4k, 8k, 16k
// turns) are the recorder's published operating points. The encodings of the
// DIP-switch and register fields and the register map are this design's own.
package bcr_pkg;

  // One ADC word carries the two samples produced per RF/2 clock by the
  // ADC's built-in 1:2 demultiplexer: sample of the even bunch in [7:0],
  // the following odd bunch in [15:8].
  localparam int unsigned SAMPLE_W = 8;
  localparam int unsigned ADC_W    = 2 * SAMPLE_W;
  // Memory words hold four ADC words (eight bunches).
  localparam int unsigned LANES    = 4;
  localparam int unsigned MEM_W    = LANES * ADC_W;

  localparam int unsigned H_MAX    = 5120;          // largest harmonic number
  localparam int unsigned TURN_MAX = H_MAX / 2;     // ADC words per turn
  localparam int unsigned TURN_W   = $clog2(TURN_MAX);

  // Ring selection on the DIP switch.
  typedef enum logic [1:0] {
    RING_SKEKB = 2'd0,   // SuperKEKB LER/HER, h = 5120
    RING_PFAR  = 2'd1,   // PF-AR, h = 640
    RING_PF    = 2'd2,   // PF ring, h = 312
    RING_DR    = 2'd3    // SuperKEKB damping ring, h = 230
  } ring_e;

  typedef enum logic {
    MODE_BUNCH  = 1'b0,  // bunch current mode: one-turn ring memory in block RAM
    MODE_MEMORY = 1'b1   // large scale memory mode: many turns in DDR2
  } mode_e;

  typedef enum logic [1:0] {
    TRIG_M100 = 2'd0,    // stop right after the stop signal
    TRIG_0    = 2'd1,    // stop after half the memory is written after it
    TRIG_P100 = 2'd2     // stop after the whole memory is written after it
  } trigpos_e;

  typedef enum logic [1:0] {
    MEM_4K  = 2'd0,
    MEM_8K  = 2'd1,
    MEM_16K = 2'd2
  } memsize_e;

  // Harmonic number of a ring.
  function automatic int unsigned harmonic(ring_e r);
    case (r)
      RING_SKEKB: return 5120;
      RING_PFAR:  return 640;
      RING_PF:    return 312;
      default:    return 230;
    endcase
  endfunction

  // Number of turns recorded in memory mode (16k for the reserved code).
  function automatic int unsigned mem_turns(memsize_e m);
    case (m)
      MEM_4K:  return 4096;
      MEM_8K:  return 8192;
      default: return 16384;
    endcase
  endfunction

  // VME register map, byte offsets inside the board's 512-byte window.
  localparam logic [8:0] REG_STATUS  = 9'h000;  // R: status, reading clears the done flag
  localparam logic [8:0] REG_CONTROL = 9'h004;  // W: commands and enables
  localparam logic [8:0] REG_CONFIG  = 9'h008;  // R/W: trigger position, memory size
  localparam logic [8:0] REG_DELAY   = 9'h00C;  // R/W: RF clock delay code
  localparam logic [8:0] REG_STOPPTR = 9'h010;  // R: ADC-word write pointer at stop
  localparam logic [8:0] REG_COUNT   = 9'h014;  // R: D32 words available to read
  localparam logic [8:0] REG_ADCDATA = 9'h100;  // R: ADC data window (FIFO)

  // Bits of the control register.
  localparam int unsigned CTL_START   = 0;
  localparam int unsigned CTL_STOP    = 1;
  localparam int unsigned CTL_DMXRST  = 2;
  localparam int unsigned CTL_IRQEN   = 3;

  localparam logic [5:0] AM_A32_SUP_DATA = 6'h0D;
  localparam logic [5:0] AM_A32_SUP_BLT  = 6'h0F;

  localparam int unsigned DELAY_W = 10;   // 10 ps steps over about 10 ns

endpackage
