// pix_slv_regs: the eight 32-bit slave registers slv_reg0..slv_reg7.
//
// The processor writes and reads the registers through a plain synchronous
// port (wr, addr, wdata; rdata is combinational on addr). Bit positions are
// given in processor numbering, bit 0 = least significant bit of the bus
// word; the core's own numbering counts from the other end (core bit i is
// bus bit 31-i). Field layout, read-only bits and reset values of 0x0F
// (integration clock limit) and 6 (ADC pipeline delay) follow the readout;
// the bus port, the other reset values (0) and the sticky phase-done flags
// are this implementation's choices.
//   reg0  [31:21] PIX_FRAME_SIZE  [7:4] mode
//   reg1  [0] JTAG TDI  [1] TCK  [2] TMS  [3] ST-control data  [4] ST-control
//         clock  [8] DAC data  [9] DAC clock  [10] DAC sync (all outputs);
//         read: [5] JTAG TDO  [6] ST-control data in  [7] DAC data in
//   reg2  [31] DAQ ON  [30] use trigger
//   reg3  [31] fifo reset  [30] fast reset force high  [29] force low
//         [28] front-end reset; read: [2] pk_fifo empty [1] almost full [0] full
//   reg4  [7:0] pk_clk limit  [15:8] integration clock limit  [19] invert ADC
//         clock  [23:20] ADC pipeline delay
//   reg5  reserved, read/write
//   reg6  read [0] fastblock
//   reg7  [0] DCM PSEN [1] PSINCDEC [2] DCM_1 PSEN [3] DCM_1 PSINCDEC
//         [4] DCM reset [5] DCM_1 reset; [28]/[29] DCM_1/DCM phase done
//         (read: flag set by a psdone pulse; write 1: hold flag clear);
//         read [30] DCM_1 locked [31] DCM locked
// The serial DACs, the chip JTAG and the ST-control line are driven straight
// from reg1 bits: their protocols are run by software. DAQ ON releases the
// reset of the matrix the mode selects (matrix_rst: [3] MX [2] Y [1] ST
// [0] chip ADC, active high). rst is synchronous, active high.
module pix_slv_regs
  import pix_pkg::*;
#(
  parameter logic [7:0] INT_DIV_RESET  = 8'h0F,
  parameter logic [3:0] ADC_PIPE_RESET = 4'd6
) (
  input  logic        clk,
  input  logic        rst,
  // register port
  input  logic        wr,
  input  logic [2:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // decoded configuration
  output pix_cfg_t    cfg,
  // status in
  input  logic        pk_empty,
  input  logic        pk_almost_full,
  input  logic        pk_full,
  input  logic        fastblock,
  // bit-banged serial pins
  output logic        jtag_tdi,
  output logic        jtag_tck,
  output logic        jtag_tms,
  input  logic        jtag_tdo,
  output logic        stc_sdata,
  output logic        stc_sclk,
  input  logic        stc_sdin,
  output logic        dac_sdata,
  output logic        dac_sclk,
  output logic        dac_sync,
  input  logic        dac_sdin,
  // chip controls
  output logic        fast_reset,
  output logic [3:0]  matrix_rst,
  // DCM controls
  output logic        dcm_psen,
  output logic        dcm_psincdec,
  output logic        dcm_rst,
  input  logic        dcm_psdone,
  input  logic        dcm_locked,
  output logic        dcm1_psen,
  output logic        dcm1_psincdec,
  output logic        dcm1_rst,
  input  logic        dcm1_psdone,
  input  logic        dcm1_locked
);
  localparam logic [31:0] REG4_RESET = {8'h00, ADC_PIPE_RESET, 4'h0, INT_DIV_RESET, 8'h00};

  logic [31:0] r [8];
  logic        dcm_done, dcm1_done;

  always_ff @(posedge clk)
    if (rst) begin
      r         <= '{default: '0};
      r[4]      <= REG4_RESET;
      dcm_done  <= 1'b0;
      dcm1_done <= 1'b0;
    end else begin
      if (wr) r[addr] <= wdata;
      if (r[7][29])        dcm_done  <= 1'b0;
      else if (dcm_psdone) dcm_done  <= 1'b1;
      if (r[7][28])         dcm1_done <= 1'b0;
      else if (dcm1_psdone) dcm1_done <= 1'b1;
    end

  always_comb begin
    rdata = r[addr];
    unique case (addr)
      3'd1: rdata[7:5] = {dac_sdin, stc_sdin, jtag_tdo};
      3'd3: rdata[2:0] = {pk_empty, pk_almost_full, pk_full};
      3'd6: rdata[0]   = fastblock;
      3'd7: rdata[31:28] = {dcm_locked, dcm1_locked, dcm_done, dcm1_done};
      default: ;
    endcase
  end

  always_comb begin
    cfg.frame_size  = r[0][31:21];
    cfg.mode        = mode_e'(r[0][7:4]);
    cfg.daq_on      = r[2][31];
    cfg.use_trigger = r[2][30];
    cfg.fifo_reset  = r[3][31];
    cfg.fe_reset    = r[3][28];
    cfg.pk_div      = r[4][7:0];
    cfg.int_div     = r[4][15:8];
    cfg.adc_clk_inv = r[4][19];
    cfg.adc_pipe    = r[4][23:20];
  end

  assign {jtag_tms, jtag_tck, jtag_tdi}  = r[1][2:0];
  assign {stc_sclk, stc_sdata}           = r[1][4:3];
  assign {dac_sync, dac_sclk, dac_sdata} = r[1][10:8];

  assign fast_reset = r[3][30];

  assign matrix_rst[3] = !(cfg.daq_on && cfg.mode == MODE_MX);
  assign matrix_rst[2] = !(cfg.daq_on && cfg.mode == MODE_Y);
  assign matrix_rst[1] = !(cfg.daq_on && cfg.mode == MODE_ST);
  assign matrix_rst[0] = !(cfg.daq_on && cfg.mode == MODE_ADC);

  assign {dcm_psincdec, dcm_psen}   = r[7][1:0];
  assign {dcm1_psincdec, dcm1_psen} = r[7][3:2];
  assign {dcm1_rst, dcm_rst}        = r[7][5:4];
endmodule
