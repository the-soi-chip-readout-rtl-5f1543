// soi_readout_top: the pix_2015_b readout core for the SOI pixel chip.
//
// Events ("pixel frames") from the SOI chip are gathered in the front-end
// clock domain (pk_clk, a division of the 125 MHz system clock), framed and
// stamped, written into the 16k x 32 front-end fifo pk_fifo, moved by a small
// state machine into the 2k x 32 packet fifo PFIFO, and read from there by
// the processor, which sees PFIFO's output port and status. Four sources
// exist: the MX (576-word) and Y (128-word) matrices digitised by an external
// 12-bit ADC and framed by the chip, the on-chip 10-bit ADC framed here in
// 1024-word events, and the self-triggering (ST) matrix whose serial hits are
// deserialized in a separate fast clock domain and cut into 128-word events
// by the 1k x 20 ST FIFO. Two test modes add an internal pattern and an
// internally framed external-ADC stream. Eight slave registers control all
// of it and drive the bit-banged JTAG, DAC and ST-control pins.
//
// Clock domains: sys_clk (125 MHz: registers, clock generator, transfer,
// PFIFO), pk_clk (front end, made by pix_clock_gen), st_clk (deserializer,
// supplied from outside: in the original system it comes from a clock
// manager). The processor bus is a plain register port here; the processor,
// its memory and network, the DCMs and the external ADC/DACs are outside.
// rst_n is asynchronous, active low. Register fields: see pix_slv_regs.
// The block set, fifo sizes and event sizes are the original's; the reset
// scheme, the header format and the crossings are this design's choices:
// DAQ ON, mode, frame size and ADC delay reach pk_clk through two flops
// (the multi-bit ones are meant to change only while DAQ is off), and the
// pk_fifo full / almost-full bits reach sys_clk the same way.
module soi_readout_top
  import pix_pkg::*;
#(
  parameter int unsigned PK_FIFO_AW = 14,  // pk_fifo 16k x 32
  parameter int unsigned PFIFO_AW   = 11,  // PFIFO 2k x 32
  parameter int unsigned ST_FIFO_AW = 10   // ST FIFO 1k x 20
) (
  input  logic                sys_clk,
  input  logic                rst_n,
  input  logic                st_clk,
  // slave register port
  input  logic                bus_wr,
  input  logic [2:0]          bus_addr,
  input  logic [31:0]         bus_wdata,
  output logic [31:0]         bus_rdata,
  // PFIFO read port
  input  logic                pfifo_rd,
  output logic [31:0]         pfifo_dout,
  output logic                pfifo_empty,
  output logic                pfifo_full,
  output logic [PFIFO_AW:0]   pfifo_count,
  // chip and board: data
  input  logic                trig_clk,
  input  logic                trig_rst,
  input  logic                ext_frame,
  input  logic                ext_wr_en,
  input  logic [11:0]         adc_data,
  input  logic [9:0]          ad_data,
  input  logic                st_sdata,
  input  logic                st_sen,
  // chip and board: clocks out
  output logic                matrix_clk,
  output logic                adc_clk,
  output logic                ad_clk,
  output logic                int_clk,
  output logic                st_fast_clk,
  // chip and board: bit-banged serial lines and controls
  output logic                jtag_tdi,
  output logic                jtag_tck,
  output logic                jtag_tms,
  input  logic                jtag_tdo,
  output logic                stc_sdata,
  output logic                stc_sclk,
  input  logic                stc_sdin,
  output logic                dac_sdata,
  output logic                dac_sclk,
  output logic                dac_sync,
  input  logic                dac_sdin,
  output logic                fast_reset,
  input  logic                fastblock,
  output logic [3:0]          matrix_rst,
  output logic                use_trigger,
  // DCM control and status
  output logic                dcm_psen,
  output logic                dcm_psincdec,
  output logic                dcm_rst,
  input  logic                dcm_psdone,
  input  logic                dcm_locked,
  output logic                dcm1_psen,
  output logic                dcm1_psincdec,
  output logic                dcm1_rst,
  input  logic                dcm1_psdone,
  input  logic                dcm1_locked
);
  pix_cfg_t cfg;

  logic sys_rst, fifo_rst, fe_rst_a, pk_rst, st_rst;
  logic pk_clk, pk_rise;

  // ---- resets ----
  reset_sync u_sys_rst (.clk(sys_clk), .rst_in(!rst_n), .rst_out(sys_rst));
  assign fifo_rst = sys_rst || cfg.fifo_reset;
  assign fe_rst_a = sys_rst || cfg.fe_reset;
  reset_sync u_pk_rst (.clk(pk_clk), .rst_in(fe_rst_a), .rst_out(pk_rst));
  reset_sync u_st_rst (.clk(st_clk), .rst_in(fe_rst_a), .rst_out(st_rst));

  // ---- slave registers ----
  logic pk_empty, pk_full_s, pk_af_s;

  pix_slv_regs u_regs (
    .clk(sys_clk), .rst(sys_rst),
    .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(bus_rdata), .cfg(cfg),
    .pk_empty(pk_empty), .pk_almost_full(pk_af_s), .pk_full(pk_full_s), .fastblock(fastblock),
    .jtag_tdi(jtag_tdi), .jtag_tck(jtag_tck), .jtag_tms(jtag_tms), .jtag_tdo(jtag_tdo),
    .stc_sdata(stc_sdata), .stc_sclk(stc_sclk), .stc_sdin(stc_sdin),
    .dac_sdata(dac_sdata), .dac_sclk(dac_sclk), .dac_sync(dac_sync), .dac_sdin(dac_sdin),
    .fast_reset(fast_reset), .matrix_rst(matrix_rst),
    .dcm_psen(dcm_psen), .dcm_psincdec(dcm_psincdec), .dcm_rst(dcm_rst),
    .dcm_psdone(dcm_psdone), .dcm_locked(dcm_locked),
    .dcm1_psen(dcm1_psen), .dcm1_psincdec(dcm1_psincdec), .dcm1_rst(dcm1_rst),
    .dcm1_psdone(dcm1_psdone), .dcm1_locked(dcm1_locked)
  );
  assign use_trigger = cfg.use_trigger;

  // ---- clocks ----
  pix_clock_gen u_clk (
    .clk(sys_clk), .rst(sys_rst), .pk_div(cfg.pk_div), .int_div(cfg.int_div),
    .adc_inv(cfg.adc_clk_inv), .pk_clk(pk_clk), .pk_rise(pk_rise),
    .adc_clk(adc_clk), .int_clk(int_clk)
  );
  assign matrix_clk  = pk_clk;
  assign ad_clk      = pk_clk;
  assign st_fast_clk = st_clk;

  // ---- ST path: deserializer and event-forming FIFO ----
  logic [19:0] st_word, st_ev_data;
  logic        st_word_valid, st_ena, st_ev_frame, st_ev_valid, st_ev_ready, st_wfull;

  st_deserializer #(.W(20)) u_deser (
    .st_clk(st_clk), .rst(st_rst), .sdata(st_sdata), .sen(st_sen),
    .word(st_word), .word_valid(st_word_valid)
  );

  st_event_fifo #(.W(20), .AW(ST_FIFO_AW), .EVENT_WORDS(ST_EVENT_WORDS)) u_st_fifo (
    .rst(fe_rst_a),
    .st_clk(st_clk), .we(st_word_valid), .wdata(st_word), .wfull(st_wfull),
    .pk_clk(pk_clk), .ena(st_ena), .ev_ready(st_ev_ready),
    .ev_frame(st_ev_frame), .ev_valid(st_ev_valid), .ev_data(st_ev_data)
  );

  // ---- front end ----
  logic              fe_we, fe_af, pk_wfull;
  logic [31:0]       fe_wdata;
  logic [PK_FIFO_AW:0] pk_wfree, pk_rcount;
  logic [63:0]       ts;
  logic [31:0]       frame_count, frames_written, frames_skipped;

  // Settings written on sys_clk reach the front end through two flops. DAQ ON
  // is a single bit; mode, frame size and delay are meant to change only
  // while DAQ is off, so their bits are stable when they are used.
  logic        fe_daq_on;
  logic [3:0]  fe_mode, fe_adc_pipe;
  logic [10:0] fe_frame_size;

  sync2 #(.W(20)) u_cfg_sync (
    .clk(pk_clk), .rst(pk_rst),
    .d({cfg.daq_on, cfg.mode, cfg.frame_size, cfg.adc_pipe}),
    .q({fe_daq_on, fe_mode, fe_frame_size, fe_adc_pipe})
  );

  pix_frontend #(.FREE_W(PK_FIFO_AW + 1)) u_fe (
    .clk(pk_clk), .rst(pk_rst),
    .daq_on(fe_daq_on), .mode(fe_mode), .frame_size(fe_frame_size), .adc_pipe(fe_adc_pipe),
    .ext_frame(ext_frame), .ext_wr_en(ext_wr_en), .adc_data(adc_data), .ad_data(ad_data),
    .trig_clk(trig_clk), .trig_rst(trig_rst),
    .st_ena(st_ena), .st_frame(st_ev_frame), .st_valid(st_ev_valid), .st_data(st_ev_data),
    .wfree(pk_wfree), .fifo_we(fe_we), .fifo_wdata(fe_wdata),
    .almost_full(fe_af), .ts(ts), .frame_count(frame_count),
    .frames_written(frames_written), .frames_skipped(frames_skipped)
  );

  // ---- pk_fifo ----
  logic        pk_rd;
  logic [31:0] pk_rdata;

  async_fifo #(.W(32), .AW(PK_FIFO_AW)) u_pk_fifo (
    .rst(fifo_rst),
    .wclk(pk_clk), .we(fe_we), .wdata(fe_wdata), .wfull(pk_wfull), .wfree(pk_wfree),
    .rclk(sys_clk), .rd(pk_rd), .rdata(pk_rdata), .rempty(pk_empty), .rcount(pk_rcount)
  );

  sync2 #(.W(2)) u_stat_sync (
    .clk(sys_clk), .rst(sys_rst), .d({pk_wfull, fe_af}), .q({pk_full_s, pk_af_s})
  );

  // ---- transfer state machine and PFIFO ----
  logic        pf_we;
  logic [31:0] pf_wdata, moved, stall;

  pk_to_pfifo #(.PF_AW(PFIFO_AW)) u_xfer (
    .clk(sys_clk), .rst(fifo_rst),
    .pk_empty(pk_empty), .pk_rd(pk_rd), .pk_rdata(pk_rdata),
    .pf_count(pfifo_count), .pf_we(pf_we), .pf_wdata(pf_wdata),
    .moved(moved), .stall(stall)
  );

  sync_fifo #(.W(32), .AW(PFIFO_AW)) u_pfifo (
    .clk(sys_clk), .rst(fifo_rst),
    .we(pf_we), .wdata(pf_wdata), .full(pfifo_full),
    .rd(pfifo_rd), .rdata(pfifo_dout), .empty(pfifo_empty), .count(pfifo_count)
  );
endmodule
