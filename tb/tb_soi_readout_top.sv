// tb_soi_readout_top: end-to-end test of the readout core at its default
// sizes (pk_fifo 16k x 32, PFIFO 2k x 32, ST FIFO 1k x 20).
//
// A processor model writes and reads the slave registers and, like the
// readout software, waits until PFIFO holds a whole frame before reading it.
// A chip model drives the sources from the clocks the core sends out:
//   MX (576 words) and Y (128 words) frames through an external ADC with a
//     6-clock conversion latency, matched by the ADC pipeline delay setting;
//   the on-chip ADC, one sample per clock;
//   ST hits sent serially on a fast separate clock;
//   trigger clock pulses for the time stamp.
// Every frame read back is checked word by word against values worked out
// here (header frame number and stamp included). The test then stops reading
// so that PFIFO fills (transfer stall) and pk_fifo runs out of room (whole
// frames skipped, seen as gaps in the frame numbers and as the almost-full
// status bit), drains everything, and finishes with a fifo reset. Each of
// these mechanisms is counted and a failure is counted for any that never
// happened.
module tb_soi_readout_top;
  import pix_pkg::*;
  logic sys_clk = 0, rst_n = 1, st_clk = 0;
  logic bus_wr = 0;
  logic [2:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic pfifo_rd = 0, pfifo_empty, pfifo_full;
  logic [31:0] pfifo_dout;
  logic [11:0] pfifo_count;
  logic trig_clk = 0, trig_rst = 0, ext_frame = 0, ext_wr_en = 0;
  logic [11:0] adc_data = 0;
  logic [9:0] ad_data = 0;
  logic st_sdata = 0, st_sen = 0;
  logic matrix_clk, adc_clk, ad_clk, int_clk, st_fast_clk;
  logic jtag_tdi, jtag_tck, jtag_tms, stc_sdata, stc_sclk, dac_sdata, dac_sclk, dac_sync;
  logic fast_reset, use_trigger;
  logic [3:0] matrix_rst;
  logic dcm_psen, dcm_psincdec, dcm_rst, dcm1_psen, dcm1_psincdec, dcm1_rst;

  soi_readout_top dut (
    .jtag_tdo(1'b0), .stc_sdin(1'b0), .dac_sdin(1'b0), .fastblock(1'b0),
    .dcm_psdone(1'b0), .dcm_locked(1'b1), .dcm1_psdone(1'b0), .dcm1_locked(1'b1),
    .*);

  always #4 sys_clk = !sys_clk;  // 125 MHz
  always #1.5 st_clk = !st_clk;  // fast ST clock

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // mechanism counters
  int n_mx = 0, n_y = 0, n_adc = 0, n_st = 0, n_tint = 0, n_text = 0;
  int n_skip = 0, n_pfull = 0, n_af_bit = 0, n_fifo_reset = 0, n_div = 0, n_stamp = 0;

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge sys_clk) if (pfifo_full && !pfifo_empty) n_pfull++;

  // ---------------- processor model ----------------
  task automatic wreg(input int a, input logic [31:0] v);
    @(negedge sys_clk);
    bus_wr = 1; bus_addr = 3'(a); bus_wdata = v;
    @(negedge sys_clk);
    bus_wr = 0;
  endtask

  task automatic rreg(input int a, output logic [31:0] v);
    @(negedge sys_clk);
    bus_addr = 3'(a);
    #1 v = bus_rdata;
  endtask

  task automatic pop(output logic [31:0] v);
    @(negedge sys_clk);
    while (pfifo_empty) @(negedge sys_clk);
    pfifo_rd = 1;
    @(negedge sys_clk);
    pfifo_rd = 0;
    v = pfifo_dout;
  endtask

  // read one whole frame of n words once PFIFO holds it
  logic [31:0] fr[$];
  task automatic read_frame(input int n);
    logic [31:0] v;
    fr.delete();
    while (int'(pfifo_count) < n + 3) @(negedge sys_clk);
    repeat (n + 3) begin pop(v); fr.push_back(v); end
  endtask

  int last_fno = -1;
  longint stamp = 0;
  task automatic check_header(input string what, input bit check_stamp = 1);
    chk(int'(fr[0]) > last_fno, $sformatf("%s: frame number %0d after %0d", what, fr[0], last_fno));
    if (int'(fr[0]) > last_fno + 1 && last_fno >= 0) n_skip += int'(fr[0]) - last_fno - 1;
    last_fno = int'(fr[0]);
    if (check_stamp) begin
      chk({fr[1], fr[2]} == 64'(stamp), $sformatf("%s: stamp %0d exp %0d", what, {fr[1], fr[2]}, stamp));
      if ({fr[1], fr[2]} == 64'(stamp) && stamp > 0) n_stamp++;
    end
  endtask

  // ---------------- chip model ----------------
  task automatic trig_pulses(input int n);
    repeat (n) begin
      repeat (12) @(negedge sys_clk); trig_clk = 1;
      repeat (12) @(negedge sys_clk); trig_clk = 0;
      stamp++;
    end
    repeat (30) @(negedge sys_clk);
  endtask

  // external ADC: the value of sample i appears LAT matrix clocks after its
  // enable; values are base + i
  localparam int LAT = 6;
  task automatic chip_frame(input int n, input logic [11:0] base);
    for (int i = 0; i < n + LAT; i++) begin
      @(negedge matrix_clk);
      ext_frame = (i < n); ext_wr_en = (i < n);
      adc_data  = (i >= LAT) ? 12'(base + 12'(i - LAT)) : 12'hFFF;
    end
    @(negedge matrix_clk); ext_frame = 0; ext_wr_en = 0;
  endtask

  // on-chip ADC: a running count, one per clock
  always @(negedge ad_clk) ad_data <= ad_data + 1'b1;

  // serial ST hits, MSB first
  task automatic st_send(input logic [19:0] w);
    for (int b = 19; b >= 0; b--) begin
      @(negedge st_clk); st_sen = 1; st_sdata = w[b];
    end
    @(negedge st_clk); st_sen = 0;
  endtask

  // stop a run as the run control does: DAQ off, let the front end see it
  // and any running frame end, then reset both fifos
  task automatic stop_run();
    wreg(2, 32'h0);
    repeat (5000) @(negedge sys_clk);
    wreg(3, 32'h8000_0000);
    wreg(3, 32'h0);
    repeat (40) @(negedge sys_clk);
  endtask

  function automatic logic [31:0] mode_word(input logic [3:0] m, input int size);
    return {11'(size), 13'd0, m, 4'd0};
  endfunction

  // measure the pk_clk period in system clocks
  task automatic pk_period(output int p);
    int t;
    @(posedge matrix_clk);
    t = 0;
    fork
      begin @(posedge matrix_clk); end
      forever begin @(posedge sys_clk); t++; end
    join_any
    disable fork;
    p = t;
  endtask

  initial begin
    logic [31:0] v;
    int p;
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (10) @(negedge sys_clk);
    rreg(4, v);
    chk(v == 32'h0060_0F00, $sformatf("reg4 reset %h", v));
    pk_period(p);
    chk(p == 2, $sformatf("pk_clk period %0d at limit 0", p));
    wreg(4, 32'h0060_0F01);   // pk_clk = 125 MHz / 4
    repeat (10) @(negedge sys_clk);
    pk_period(p);
    chk(p == 4, $sformatf("pk_clk period %0d at limit 1", p));
    if (p == 4) n_div++;

    // ---- MX ----
    trig_pulses(3);
    wreg(0, mode_word(MODE_MX, MX_EVENT_WORDS));
    wreg(2, 32'h8000_0000);
    chk(matrix_rst == 4'b0111, "MX reset released");
    for (int f = 0; f < 2; f++) begin
      fork
        chip_frame(MX_EVENT_WORDS, 12'(100 * f));
        read_frame(MX_EVENT_WORDS);
      join
      check_header("mx");
      for (int i = 0; i < MX_EVENT_WORDS; i++)
        chk(fr[3+i] == 32'(100 * f + i), $sformatf("mx word %0d: %h", i, fr[3+i]));
      n_mx++;
      trig_pulses(2);
    end

    // ---- Y ----
    wreg(0, mode_word(MODE_Y, Y_EVENT_WORDS));
    fork
      chip_frame(Y_EVENT_WORDS, 12'h800);
      read_frame(Y_EVENT_WORDS);
    join
    check_header("y");
    for (int i = 0; i < Y_EVENT_WORDS; i++)
      chk(fr[3+i] == 32'(12'h800 + i), $sformatf("y word %0d: %h", i, fr[3+i]));
    n_y++;

    // ---- ST ----
    trig_pulses(4);
    wreg(0, mode_word(MODE_ST, 0));
    fork
      for (int i = 0; i < ST_EVENT_WORDS + 10; i++) st_send(20'(i * 5 + 1));
      read_frame(ST_EVENT_WORDS);
    join
    check_header("st");
    for (int i = 0; i < ST_EVENT_WORDS; i++)
      chk(fr[3+i] == {12'(stamp), 20'(i * 5 + 1)}, $sformatf("st word %0d: %h", i, fr[3+i]));
    n_st++;

    // ---- chip ADC ----
    wreg(0, mode_word(MODE_ADC, 0));
    for (int f = 0; f < 2; f++) begin
      read_frame(ADC_EVENT_WORDS);
      check_header("adc");
      for (int i = 1; i < ADC_EVENT_WORDS; i++)
        chk(fr[3+i] == {22'b0, 10'(fr[3+i-1] + 1)}, $sformatf("adc word %0d", i));
      n_adc++;
    end
    // stop the run: DAQ off, then reset both fifos as the run control does
    stop_run();
    chk(pfifo_empty && pfifo_count == 0, "fifos empty after reset");
    rreg(3, v);
    chk(v[2], "pk_fifo empty bit after reset");
    if (pfifo_empty && v[2]) n_fifo_reset++;

    // ---- test modes ----
    wreg(0, mode_word(MODE_TEST_INT, 64));
    wreg(2, 32'h8000_0000);
    read_frame(64);
    check_header("test int", 0);
    for (int i = 1; i < 64; i++) chk(fr[3+i] == fr[3+i-1] + 1, "pattern consecutive");
    n_tint++;
    stop_run();               // drop what the pattern generator left
    wreg(0, mode_word(MODE_TEST_EXT, 32));
    adc_data = 12'h5A5;
    wreg(2, 32'h8000_0000);
    read_frame(32);
    check_header("test ext", 0);
    for (int i = 0; i < 32; i++) chk(fr[3+i] == 32'h5A5, $sformatf("test ext word %h", fr[3+i]));
    n_text++;
    stop_run();

    // ---- overflow: nobody reads, chip ADC fills PFIFO then pk_fifo ----
    wreg(0, mode_word(MODE_ADC, 0));
    wreg(2, 32'h8000_0000);
    begin
      int guard = 0;
      do begin
        repeat (200) @(negedge sys_clk);
        rreg(3, v);
        guard++;
      end while (!v[1] && guard < 1000);
      if (v[1]) n_af_bit++;
      repeat (30000) @(negedge sys_clk);   // frames keep arriving and are skipped
    end
    wreg(2, 32'h0);
    repeat (6000) @(negedge sys_clk);      // let the last running frame end
    // drain: whole frames only, numbers must show the skipped ones
    begin
      int nfr = 0;
      while (!pfifo_empty) begin
        read_frame(ADC_EVENT_WORDS);
        check_header("overflow drain", 0);
        for (int i = 1; i < ADC_EVENT_WORDS; i++)
          chk(fr[3+i] == {22'b0, 10'(fr[3+i-1] + 1)}, "adc word after overflow");
        nfr++;
        repeat (20) @(negedge sys_clk);
      end
      chk(nfr >= 17, $sformatf("frames held by pk_fifo and PFIFO: %0d", nfr));
    end

    // ---- mechanism report ----
    $display("mechanisms: mx=%0d y=%0d st=%0d adc=%0d test_int=%0d test_ext=%0d skipped=%0d pfifo_full_cycles=%0d almost_full_bit=%0d fifo_reset=%0d clock_div=%0d stamps=%0d",
             n_mx, n_y, n_st, n_adc, n_tint, n_text, n_skip, n_pfull, n_af_bit, n_fifo_reset, n_div, n_stamp);
    chk(n_mx > 0, "MX frames");
    chk(n_y > 0, "Y frames");
    chk(n_st > 0, "ST events");
    chk(n_adc > 0, "chip ADC frames");
    chk(n_tint > 0, "internal pattern frames");
    chk(n_text > 0, "external ADC test frames");
    chk(n_skip > 0, "whole frames skipped on a full pk_fifo");
    chk(n_pfull > 0, "PFIFO full stalled the transfer");
    chk(n_af_bit > 0, "almost-full status bit seen");
    chk(n_fifo_reset > 0, "fifo reset");
    chk(n_div > 0, "pk_clk division changed");
    chk(n_stamp > 0, "time stamps from trigger pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
