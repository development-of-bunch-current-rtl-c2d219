// vme_slave: the board's VME control CPLD.
//
// Implements the recorder's VME functions:
//  * A32 D32 supervisory data access (AM 0x0D) to the registers of a
//    512-byte window whose base comes from the board switches; the ADC data
//    are read through a single D32 address that behaves as a FIFO;
//  * A32 supervisory block transfer (BLT, AM 0x0F), accepted only in the
//    256-byte ADC data area; the address is ignored and every beat reads the
//    ADC data FIFO, as long as AS* stays low;
//  * a release-on-acknowledge (ROAK) interrupter whose level and vector come
//    from the switches: the IRQ line drops when the recording has finished
//    (if enabled) and is released in the acknowledge cycle that takes the
//    vector. Reading the status register also clears the interrupt status.
// Which functions exist, the AM codes, the window sizes, the ignored BLT
// address and ROAK are the recorder's; the register map and bit layout are
// this design's (see bcr_pkg).
//
// The CPLD logic runs on the board clock: AS*, DS0*, DS1* and IACKIN* pass
// two-flop synchronisers, and address, AM, WRITE* and data are sampled once
// the synchronised strobe is seen, when the VME rules guarantee them stable.
// A data-window read sends `dat_req` to the FPGA and answers DTACK* once the
// 16-to-32-bit converter reports the word (`dat_valid`); the DTACK* delay
// therefore stretches while the read FIFO is empty. DTACK* is released
// after both data strobes are released.
module vme_slave
  import bcr_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // VME bus (active-low strobes; data split into in/out/enable)
  input  logic [31:1]        vme_a,
  input  logic [5:0]         vme_am,
  input  logic               vme_as_n,
  input  logic [1:0]         vme_ds_n,
  input  logic               vme_write_n,
  input  logic               vme_iack_n,
  input  logic               vme_iackin_n,
  output logic               vme_iackout_n,
  input  logic [31:0]        vme_d_i,
  output logic [31:0]        vme_d_o,
  output logic               vme_d_oe,
  output logic               vme_dtack_n,
  output logic [7:1]         vme_irq_n,
  // board switches
  input  logic [31:9]        sw_base,
  input  logic [2:0]         sw_irq_level,  // 0: interrupter off
  input  logic [7:0]         sw_irq_vector,
  // recorder status
  input  logic               st_done,       // recording finished (level)
  input  logic               st_recording,
  input  logic               st_waiting,
  input  logic               st_stopping,
  input  logic               st_wrapped,
  input  mode_e              st_mode,
  input  ring_e              st_ring,
  input  logic [31:0]        st_stopptr,
  input  logic [31:0]        st_count,
  // commands and settings
  output logic               cmd_start,
  output logic               cmd_stop,
  output logic               cmd_dmxrst,
  output trigpos_e           cfg_trigpos,
  output memsize_e           cfg_memsize,
  output logic [DELAY_W-1:0] cfg_delay,
  // ADC data window
  output logic               dat_req,
  output logic               dat_clr,
  input  logic               dat_valid,
  input  logic [31:0]        dat_d32
);

  typedef enum logic [2:0] {V_IDLE, V_WAIT_DS, V_DATA, V_ACK, V_WAIT_AS, V_IACK} vstate_e;
  vstate_e state;

  logic [1:0] as_q, iackin_q, ds0_q, ds1_q;
  logic       as_act, ds_act, ds_rel, iackin_act;

  always_ff @(posedge clk) begin
    as_q     <= {as_q[0], vme_as_n};
    iackin_q <= {iackin_q[0], vme_iackin_n};
    ds0_q    <= {ds0_q[0], vme_ds_n[0]};
    ds1_q    <= {ds1_q[0], vme_ds_n[1]};
  end
  assign as_act     = !as_q[1];
  assign ds_act     = !ds0_q[1] || !ds1_q[1];
  assign ds_rel     = ds0_q[1] && ds1_q[1];
  assign iackin_act = !iackin_q[1];

  logic [8:0] off;        // byte offset in the window
  logic       blt, wr, irq_pend, irq_en, done_flag, done_q;
  logic [2:0] iack_lvl;

  logic addr_hit, am_ok;
  assign addr_hit = (vme_a[31:9] == sw_base);
  always_comb begin
    am_ok = 1'b0;
    if (vme_am == AM_A32_SUP_DATA) am_ok = 1'b1;
    else if (vme_am == AM_A32_SUP_BLT) am_ok = vme_a[8];   // ADC data area only
  end

  logic [31:0] reg_rd;
  always_comb begin
    case (off)
      REG_STATUS:  reg_rd = {16'd0, 5'd0, st_ring, st_mode, 1'b0, irq_en, st_done,
                             st_wrapped, st_stopping, st_waiting, st_recording, done_flag};
      REG_CONTROL: reg_rd = 32'(irq_en) << CTL_IRQEN;
      REG_CONFIG:  reg_rd = {28'd0, cfg_memsize, cfg_trigpos};
      REG_DELAY:   reg_rd = 32'(cfg_delay);
      REG_STOPPTR: reg_rd = st_stopptr;
      REG_COUNT:   reg_rd = st_count;
      default:     reg_rd = 32'd0;
    endcase
  end

  logic is_data;
  assign is_data = blt || off == REG_ADCDATA;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= V_IDLE;
      off           <= '0;
      blt           <= 1'b0;
      wr            <= 1'b0;
      iack_lvl      <= '0;
      vme_d_o       <= '0;
      vme_d_oe      <= 1'b0;
      vme_dtack_n   <= 1'b1;
      vme_iackout_n <= 1'b1;
      irq_pend      <= 1'b0;
      irq_en        <= 1'b0;
      done_flag     <= 1'b0;
      done_q        <= 1'b0;
      cmd_start     <= 1'b0;
      cmd_stop      <= 1'b0;
      cmd_dmxrst    <= 1'b0;
      cfg_trigpos   <= TRIG_M100;
      cfg_memsize   <= MEM_4K;
      cfg_delay     <= '0;
      dat_req       <= 1'b0;
      dat_clr       <= 1'b0;
    end else begin
      cmd_start  <= 1'b0;
      cmd_stop   <= 1'b0;
      cmd_dmxrst <= 1'b0;
      dat_req    <= 1'b0;
      dat_clr    <= 1'b0;

      // interrupt status: set when a recording finishes
      done_q <= st_done;
      if (st_done && !done_q) begin
        done_flag <= 1'b1;
        if (irq_en && sw_irq_level != 3'd0) irq_pend <= 1'b1;
      end

      case (state)
        V_IDLE: if (as_act) begin
          if (!vme_iack_n) begin
            iack_lvl <= vme_a[3:1];
            state    <= V_IACK;
          end else if (addr_hit && am_ok) begin
            off   <= {vme_a[8:2], 2'b00};
            blt   <= (vme_am == AM_A32_SUP_BLT);
            wr    <= !vme_write_n;
            state <= V_WAIT_DS;
          end else begin
            state <= V_WAIT_AS;
          end
        end
        V_WAIT_DS: begin
          if (!as_act) state <= V_IDLE;
          else if (ds_act) begin
            if (wr) begin
              if (!blt) begin
                case (off)
                  REG_CONTROL: begin
                    cmd_start  <= vme_d_i[CTL_START];
                    cmd_stop   <= vme_d_i[CTL_STOP];
                    cmd_dmxrst <= vme_d_i[CTL_DMXRST];
                    irq_en     <= vme_d_i[CTL_IRQEN];
                    if (!vme_d_i[CTL_IRQEN]) irq_pend <= 1'b0;
                  end
                  REG_CONFIG: begin
                    cfg_trigpos <= trigpos_e'(vme_d_i[1:0]);
                    cfg_memsize <= memsize_e'(vme_d_i[3:2]);
                  end
                  REG_DELAY: cfg_delay <= vme_d_i[DELAY_W-1:0];
                  default: ;
                endcase
              end
              state <= V_ACK;
            end else if (is_data) begin
              dat_req <= 1'b1;
              dat_clr <= 1'b1;
              state   <= V_DATA;
            end else begin
              vme_d_o <= reg_rd;
              if (off == REG_STATUS) begin
                done_flag <= 1'b0;
                irq_pend  <= 1'b0;
              end
              state <= V_ACK;
            end
          end
        end
        V_DATA: if (dat_valid && !dat_clr) begin
          vme_d_o <= dat_d32;
          state   <= V_ACK;
        end
        V_ACK: begin
          vme_d_oe    <= !wr;
          vme_dtack_n <= 1'b0;
          if (!vme_dtack_n && ds_rel) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            if (blt && as_act) state <= V_WAIT_DS;
            else state <= V_WAIT_AS;
          end
        end
        V_WAIT_AS: begin
          if (!as_act) begin
            state         <= V_IDLE;
            vme_iackout_n <= 1'b1;
          end
        end
        V_IACK: begin
          if (!as_act) state <= V_IDLE;
          else if (iackin_act && ds_act) begin
            if (irq_pend && iack_lvl == sw_irq_level) begin
              vme_d_o  <= {24'd0, sw_irq_vector};
              irq_pend <= 1'b0;                  // release on acknowledge
              wr       <= 1'b0;
              blt      <= 1'b0;
              state    <= V_ACK;
            end else begin
              vme_iackout_n <= 1'b0;             // pass down the daisy chain
              state         <= V_WAIT_AS;
            end
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  always_comb begin
    vme_irq_n = '1;
    for (int l = 1; l <= 7; l++)
      if (irq_pend && sw_irq_level == 3'(l)) vme_irq_n[l] = 1'b0;
  end

  // the data lines are driven only to answer a read
  a_drive_on_read: assert property (@(posedge clk) disable iff (rst) vme_d_oe |-> !wr);

endmodule
