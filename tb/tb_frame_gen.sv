// tb_frame_gen: self-checking test of the artificial frame generator.
// With size 5 and the default gap, every frame must carry exactly 5 words,
// each the input of the clock before, with frame and valid together, and at
// least GAP+1 low cycles between frames. Dropping ena mid-frame must still
// complete the frame; size 1024 (the chip-ADC event) is checked once.
module tb_frame_gen;
  logic clk = 0, rst = 0, ena = 0, frame, valid;
  logic [10:0] size = 5;
  logic [31:0] din = 0, dout;
  int checks = 0, failures = 0, run = 0, low = 100, nframes = 0;
  logic frame_q = 0;
  int lens[$];

  frame_gen #(.W(32), .SW(11), .GAP(4)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    chk(frame == valid, "frame and valid together");
    if (valid) chk(dout == din, $sformatf("dout %h exp %h", dout, din));
    if (frame && !frame_q) chk(low >= 5, $sformatf("gap %0d", low));
    if (frame) begin run++; low = 0; end
    else begin
      if (frame_q) begin lens.push_back(run); nframes++; run = 0; end
      low++;
    end
    frame_q = frame;
    din = $urandom;
  end

  initial begin
    #1 rst = 1;
    #20 rst = 0;
    @(negedge clk) ena = 1;
    repeat (100) @(negedge clk);
    ena = 0;
    repeat (20) @(negedge clk);
    chk(nframes >= 8, $sformatf("frames %0d", nframes));
    foreach (lens[i]) chk(lens[i] == 5, $sformatf("frame length %0d", lens[i]));
    lens.delete();
    size = 1024;
    @(negedge clk) ena = 1;
    @(negedge clk) ena = 0;
    repeat (1100) @(negedge clk);
    chk(lens.size() == 1 && lens[0] == 1024, "one 1024-word frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
