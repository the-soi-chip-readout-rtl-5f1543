// tb_frame_writer: self-checking test of the frame writer.
// Frames are sent on each of the five sources with the matching mode, with
// random gaps in the write enable, and the words written to the fifo port
// are compared with an independently built list: the 3-word header (frame
// number, stamp high, stamp low) then the data in the source's 32-bit form.
// Also checked: truncation at the frame length, whole-frame skipping when
// the free space is one word short (ST at 128+3, chip ADC at 1024+3), the
// frame counter counting skipped frames, a frame starting too soon after the
// previous one, DAQ off, and that a written frame takes exactly
// header + words cycles of the write port.
module tb_frame_writer;
  import pix_pkg::*;
  logic clk = 0, rst = 0, daq_on = 0;
  logic [3:0] mode = MODE_MX;
  logic [10:0] frame_size = 11'd10;
  logic [63:0] ts = 0;
  logic ext_frame = 0, ext_valid = 0, st_frame = 0, st_valid = 0, cadc_frame = 0, cadc_valid = 0;
  logic tint_frame = 0, tint_valid = 0, text_frame = 0, text_valid = 0;
  logic [11:0] adc_data = 0, text_data = 0;
  logic [19:0] st_data = 0;
  logic [9:0] cadc_data = 0;
  logic [31:0] tint_data = 0;
  logic [14:0] wfree = 15'd16384;
  logic fifo_we, almost_full, idle;
  logic [31:0] fifo_wdata, frame_count, frames_written, frames_skipped;
  int checks = 0, failures = 0;
  logic [31:0] exp_q[$], got_q[$];
  int fc = 0, nskip = 0, nwritten = 0;

  frame_writer #(.FREE_W(15)) dut (.*);

  always #5 clk = !clk;

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

  always @(posedge clk) if (fifo_we) got_q.push_back(fifo_wdata);

  // drive one source: frame high for n_valid valid words with random gaps
  task automatic set_src(input logic [3:0] m, input logic f, input logic v, input logic [31:0] d);
    unique case (m)
      MODE_MX, MODE_Y: begin ext_frame = f; ext_valid = v; adc_data = d[11:0]; end
      MODE_ST:         begin st_frame = f; st_valid = v; st_data = d[19:0]; end
      MODE_ADC:        begin cadc_frame = f; cadc_valid = v; cadc_data = d[9:0]; end
      MODE_TEST_INT:   begin tint_frame = f; tint_valid = v; tint_data = d; end
      MODE_TEST_EXT:   begin text_frame = f; text_valid = v; text_data = d[11:0]; end
      default: ;
    endcase
  endtask

  function automatic logic [31:0] widen(input logic [3:0] m, input logic [31:0] d);
    unique case (m)
      MODE_MX, MODE_Y, MODE_TEST_EXT: return {20'b0, d[11:0]};
      MODE_ST:                        return {ts[11:0], d[19:0]};
      MODE_ADC:                       return {22'b0, d[9:0]};
      default:                        return d;
    endcase
  endfunction

  // send a frame of n words; expect it written (limit = frame length) or skipped
  task automatic send(input int n, input int limit, input bit expect_written, input bit gaps,
                      input int idle_after = 8);
    ts = {$urandom, $urandom};
    if (daq_on) begin
      if (expect_written) begin
        exp_q.push_back(32'(fc));
        exp_q.push_back(ts[63:32]);
        exp_q.push_back(ts[31:0]);
        nwritten++;
      end else nskip++;
      fc++;
    end
    for (int i = 0; i < n; i++) begin
      logic [31:0] d;
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        @(negedge clk); set_src(mode, 1'b1, 1'b0, 32'h0);
      end
      @(negedge clk);
      d = $urandom;
      set_src(mode, 1'b1, 1'b1, d);
      if (expect_written && daq_on && i < limit) exp_q.push_back(widen(mode, d));
    end
    @(negedge clk); set_src(mode, 1'b0, 1'b0, 32'h0);
    repeat (idle_after) @(negedge clk);
  endtask

  task automatic compare(input string what);
    chk(got_q.size() == exp_q.size(), $sformatf("%s: %0d words written, %0d expected", what, got_q.size(), exp_q.size()));
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++)
      chk(got_q[i] == exp_q[i], $sformatf("%s: word %0d %h exp %h", what, i, got_q[i], exp_q[i]));
    got_q.delete();
    exp_q.delete();
    chk(frame_count == 32'(fc) && frames_skipped == 32'(nskip) && frames_written == 32'(nwritten),
        $sformatf("%s: counters %0d/%0d/%0d exp %0d/%0d/%0d", what, frame_count, frames_written,
                  frames_skipped, fc, nwritten, nskip));
  endtask

  initial begin
    #1 rst = 1;
    #30 rst = 0;
    // DAQ off: nothing is written or counted
    mode = MODE_MX;
    send(10, 10, 1'b0, 1'b0);
    compare("daq off");
    daq_on = 1;
    // MX and Y, gaps in write enable
    for (int k = 0; k < 4; k++) send(10, 10, 1'b1, 1'b1);
    compare("mx");
    mode = MODE_Y;
    send(10, 10, 1'b1, 1'b0);
    send(14, 10, 1'b1, 1'b1);  // longer than the frame length: truncated
    compare("y");
    // back-to-back write port: header + words in consecutive cycles
    begin
      int t_first, t_last, cyc;
      cyc = 0; t_first = -1; t_last = -1;
      fork
        send(10, 10, 1'b1, 1'b0);
        repeat (30) begin
          @(posedge clk); cyc++;
          if (fifo_we) begin if (t_first < 0) t_first = cyc; t_last = cyc; end
        end
      join
      chk(t_last - t_first + 1 == 13, $sformatf("frame took %0d write cycles", t_last - t_first + 1));
    end
    compare("timing");
    // whole-frame skip on free space
    wfree = 15'd12;
    send(10, 10, 1'b0, 1'b0);
    chk(almost_full, "almost full with 12 free");
    wfree = 15'd13;
    send(10, 10, 1'b1, 1'b0);
    compare("skip mx");
    // ST: 128 words, stamp in the upper bits
    mode = MODE_ST;
    wfree = 15'd130;
    send(128, 128, 1'b0, 1'b0);
    wfree = 15'd131;
    send(128, 128, 1'b1, 1'b1);
    compare("st");
    // chip ADC: 1024 words
    mode = MODE_ADC;
    wfree = 15'd1026;
    send(1024, 1024, 1'b0, 1'b0);
    wfree = 15'd16384;
    send(1024, 1024, 1'b1, 1'b0);
    compare("chip adc");
    // test modes
    mode = MODE_TEST_INT;
    send(10, 10, 1'b1, 1'b0);
    mode = MODE_TEST_EXT;
    send(10, 10, 1'b1, 1'b0);
    compare("test");
    // a frame that starts one cycle after the previous one stopped is skipped
    mode = MODE_MX;
    send(10, 10, 1'b1, 1'b0, 0);
    send(10, 10, 1'b0, 1'b0);
    send(10, 10, 1'b1, 1'b0);
    compare("too soon");
    // DAQ switched off inside a frame: that frame is still written in full
    ts = {$urandom, $urandom};
    exp_q.push_back(32'(fc));
    exp_q.push_back(ts[63:32]);
    exp_q.push_back(ts[31:0]);
    nwritten++;
    fc++;
    for (int i = 0; i < 10; i++) begin
      logic [31:0] d;
      @(negedge clk);
      d = $urandom;
      set_src(mode, 1'b1, 1'b1, d);
      exp_q.push_back({20'b0, d[11:0]});
      if (i == 3) daq_on = 0;
    end
    @(negedge clk); set_src(mode, 1'b0, 1'b0, 32'h0);
    repeat (8) @(negedge clk);
    compare("daq off inside a frame");
    // DAQ switched on inside a frame: that frame is ignored, the next is kept
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      set_src(mode, 1'b1, 1'b1, $urandom);
      if (i == 3) daq_on = 1;
    end
    @(negedge clk); set_src(mode, 1'b0, 1'b0, 32'h0);
    repeat (8) @(negedge clk);
    send(10, 10, 1'b1, 1'b0);
    compare("daq on inside a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
