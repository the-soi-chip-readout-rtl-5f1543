// tb_pix_frontend: self-checking test of the front-end clock domain.
// Collects the words written towards pk_fifo and checks, per source:
//   MX with the ADC pipeline delay at 6 and at 2: the chip frame and write
//   enable are delayed, so the words are the ADC values that many clocks
//   after each enable; the header stamp equals the trigger pulses counted;
//   chip ADC: 1024-word frames of consecutive samples, frame numbers 1, 2;
//   internal test pattern: consecutive counts in PIX_FRAME_SIZE-word frames;
//   ST: the enable follows the mode, words carry the stamp in bits 31:20;
//   a trigger reset clears the stamp.
module tb_pix_frontend;
  import pix_pkg::*;
  logic clk = 0, rst = 0, daq_on = 0;
  logic [3:0] mode = MODE_MX, adc_pipe = 4'd6;
  logic [10:0] frame_size = 11'd16;
  logic ext_frame = 0, ext_wr_en = 0, trig_clk = 0, trig_rst = 0;
  logic [11:0] adc_data = 0;
  logic [9:0] ad_data = 0;
  logic st_ena, st_frame = 0, st_valid = 0;
  logic [19:0] st_data = 0;
  logic [14:0] wfree = 15'd16384;
  logic fifo_we, almost_full;
  logic [31:0] fifo_wdata, frame_count, frames_written, frames_skipped;
  logic [63:0] ts;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] got[$];

  pix_frontend #(.FREE_W(15)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc++;
    if (fifo_we) got.push_back(fifo_wdata);
  end
  // ADC value is a function of the cycle number
  always @(negedge clk) begin
    adc_data = 12'(cyc * 7 + 3);
    ad_data  = 10'(cyc);
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trig_pulses(input int n);
    repeat (n) begin
      #30 trig_clk = 1;
      #30 trig_clk = 0;
    end
    #40;
  endtask

  task automatic mx_frame(input int d, input longint stamp, input int fno);
    int c0;
    got.delete();
    adc_pipe = 4'(d);
    @(negedge clk);
    c0 = cyc;
    for (int i = 0; i < 16; i++) begin
      ext_frame = 1; ext_wr_en = 1;
      @(negedge clk);
    end
    ext_frame = 0; ext_wr_en = 0;
    repeat (30) @(negedge clk);
    chk(got.size() == 19, $sformatf("mx delay %0d: %0d words", d, got.size()));
    if (got.size() == 19) begin
      chk(got[0] == 32'(fno), $sformatf("mx frame number %0d", got[0]));
      chk({got[1], got[2]} == 64'(stamp), $sformatf("stamp %0d exp %0d", {got[1], got[2]}, stamp));
      for (int i = 0; i < 16; i++)
        chk(got[3+i] == {20'b0, 12'((c0 + i + d) * 7 + 3)},
            $sformatf("mx delay %0d word %0d: %h exp %h", d, i, got[3+i], 12'((c0 + i + d) * 7 + 3)));
    end
  endtask

  initial begin
    #1 rst = 1;
    #30 rst = 0;
    daq_on = 1;
    trig_pulses(5);
    mx_frame(6, 5, 0);
    trig_pulses(3);
    mx_frame(2, 8, 1);
    trig_rst = 1; #40 trig_rst = 0; #40;
    chk(ts == 0, "trigger reset clears stamp");

    // chip ADC
    got.delete();
    mode = MODE_ADC;
    // switch away in the gap after the second frame
    wait (got.size() == 2 * 1027);
    @(negedge clk);
    mode = MODE_MX;
    repeat (1100) @(negedge clk);
    chk(got.size() == 2 * 1027, $sformatf("adc words %0d", got.size()));
    for (int f = 0; f * 1027 < got.size(); f++) begin
      chk(got[f*1027] == 32'(2 + f), $sformatf("adc frame number %0d", got[f*1027]));
      for (int i = 1; i < 1024; i++)
        chk(got[f*1027+3+i] == {22'b0, 10'(got[f*1027+3+i-1] + 1)}, "adc consecutive samples");
    end

    // internal pattern
    got.delete();
    mode = MODE_TEST_INT;
    repeat (60) @(negedge clk);
    daq_on = 0;
    repeat (40) @(negedge clk);
    chk(got.size() >= 2 * 19 && got.size() % 19 == 0, $sformatf("pattern words %0d", got.size()));
    for (int f = 0; f * 19 < got.size(); f++)
      for (int i = 1; i < 16; i++)
        chk(got[f*19+3+i] == got[f*19+3+i-1] + 1, "pattern consecutive");

    // ST
    daq_on = 1;
    mode = MODE_ST;
    #1 chk(st_ena, "ST enable in ST mode");
    trig_pulses(9);
    got.delete();
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); st_frame = 1; st_valid = 1; st_data = 20'(i * 3);
    end
    @(negedge clk); st_frame = 0; st_valid = 0;
    repeat (10) @(negedge clk);
    chk(got.size() == 131, $sformatf("st words %0d", got.size()));
    if (got.size() == 131)
      for (int i = 0; i < 128; i++)
        chk(got[3+i] == {12'd9, 20'(i * 3)}, $sformatf("st word %0d %h", i, got[3+i]));
    mode = MODE_Y;
    #1 chk(!st_ena, "ST enable off in Y mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
