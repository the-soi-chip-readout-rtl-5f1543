// tb_pix_slv_regs: self-checking test of the slave registers.
// Checks reset values (integration clock limit 0x0F, ADC pipeline delay 6),
// write/read-back of every register with read-only bits replaced by status,
// the decoded configuration fields, the bit-banged pins, the fast reset,
// matrix resets released by DAQ ON for the selected source only, and the
// sticky DCM phase-done flags with their clear bits.
module tb_pix_slv_regs;
  import pix_pkg::*;
  logic clk = 0, rst = 1, wr = 0;
  logic [2:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  pix_cfg_t cfg;
  logic pk_empty = 0, pk_almost_full = 0, pk_full = 0, fastblock = 0;
  logic jtag_tdi, jtag_tck, jtag_tms, jtag_tdo = 0, stc_sdata, stc_sclk, stc_sdin = 0;
  logic dac_sdata, dac_sclk, dac_sync, dac_sdin = 0, fast_reset;
  logic [3:0] matrix_rst;
  logic dcm_psen, dcm_psincdec, dcm_rst, dcm_psdone = 0, dcm_locked = 0;
  logic dcm1_psen, dcm1_psincdec, dcm1_rst, dcm1_psdone = 0, dcm1_locked = 0;
  int checks = 0, failures = 0;

  pix_slv_regs dut (.*);

  always #4 clk = !clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wreg(input int a, input logic [31:0] v);
    @(negedge clk);
    wr = 1; addr = 3'(a); wdata = v;
    @(negedge clk);
    wr = 0;
  endtask

  // read all eight registers through the port into rv
  logic [31:0] rv [8];
  task automatic rall();
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #0.1;
      rv[a] = rdata;
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    rall(); chk(rv[4] == 32'h0060_0F00, $sformatf("reg4 reset %h", rv[4]));
    chk(cfg.int_div == 8'h0F && cfg.adc_pipe == 4'd6 && cfg.pk_div == 0, "reset config");
    rall(); chk(rv[0] == 0 && rv[2] == 0, "other registers reset to 0");
    chk(matrix_rst == 4'b1111, "all matrices held in reset");

    // read/write of plain registers, random patterns
    for (int k = 0; k < 20; k++) begin
      logic [31:0] v0, v2, v4, v5;
      v0 = $urandom; v2 = $urandom; v4 = $urandom; v5 = $urandom;
      wreg(0, v0); wreg(2, v2); wreg(4, v4); wreg(5, v5);
      rall(); chk(rv[0] == v0 && rv[2] == v2 && rv[4] == v4 && rv[5] == v5, "read back 0/2/4/5");
      chk(cfg.frame_size == v0[31:21] && cfg.mode == mode_e'(v0[7:4]), "reg0 fields");
      chk(cfg.daq_on == v2[31] && cfg.use_trigger == v2[30], "reg2 fields");
      chk(cfg.pk_div == v4[7:0] && cfg.int_div == v4[15:8] && cfg.adc_clk_inv == v4[19]
          && cfg.adc_pipe == v4[23:20], "reg4 fields");
    end

    // reg1: pins and read-only inputs
    wreg(1, 32'h0000_071F);
    chk({jtag_tms, jtag_tck, jtag_tdi} == 3'b111 && {stc_sclk, stc_sdata} == 2'b11
        && {dac_sync, dac_sclk, dac_sdata} == 3'b111, "reg1 outputs set");
    rall(); chk(rv[1][7:5] == 3'b000, "reg1 inputs low");
    jtag_tdo = 1; #1 rall(); chk(rv[1][5] == 1'b1, "TDO at bit 5");
    stc_sdin = 1; #1 rall(); chk(rv[1][6] == 1'b1, "ST-control data in at bit 6");
    dac_sdin = 1; #1 rall(); chk(rv[1][7] == 1'b1, "DAC data in at bit 7");
    wreg(1, 32'h0000_0102);
    chk(jtag_tck && !jtag_tdi && !jtag_tms && dac_sdata && !dac_sclk && !dac_sync && !stc_sdata,
        "reg1 single bits");

    // reg3: resets and status
    wreg(3, 32'h9000_0000);
    chk(cfg.fifo_reset && cfg.fe_reset && !fast_reset, "reg3 resets");
    wreg(3, 32'h4000_0000);
    chk(fast_reset && !cfg.fifo_reset, "fast reset forced high");
    wreg(3, 32'h2000_0000);
    chk(!fast_reset, "fast reset forced low");
    pk_empty = 1; pk_almost_full = 0; pk_full = 1;
    #1 rall(); chk(rv[3][2:0] == 3'b101, "fifo status bits");

    // reg6 fastblock
    fastblock = 1; #1 rall(); chk(rv[6][0] == 1'b1, "fastblock");
    fastblock = 0; #1 rall(); chk(rv[6][0] == 1'b0, "fastblock low");

    // matrix resets
    wreg(0, {11'd576, 13'd0, 4'b1000, 4'd0});
    wreg(2, 32'h8000_0000);
    chk(matrix_rst == 4'b0111, "MX released");
    wreg(0, {11'd128, 13'd0, 4'b0001, 4'd0});
    chk(matrix_rst == 4'b1110, "chip ADC released");
    wreg(2, 32'h0);
    chk(matrix_rst == 4'b1111, "DAQ off holds all");

    // reg7: DCM
    wreg(7, 32'h0000_0035);
    chk(dcm_psen && !dcm_psincdec && dcm1_psen && !dcm1_psincdec && dcm_rst && dcm1_rst, "DCM controls");
    dcm_locked = 1; #1 rall(); chk(rv[7][31:28] == 4'b1000, "DCM locked");
    @(negedge clk) dcm_psdone = 1;
    @(negedge clk) dcm_psdone = 0;
    rall(); chk(rv[7][29] && !rv[7][28], "DCM phase done sticky");
    @(negedge clk) dcm1_psdone = 1;
    @(negedge clk) dcm1_psdone = 0;
    rall(); chk(rv[7][29:28] == 2'b11, "DCM_1 phase done sticky");
    wreg(7, 32'h2000_0000);
    @(negedge clk);  // the flag clears on the clock after the write
    rall(); chk(rv[7][29:28] == 2'b01, "DCM phase done cleared");
    wreg(7, 32'h1000_0000);
    @(negedge clk);
    rall(); chk(rv[7][29:28] == 2'b00, "DCM_1 phase done cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
