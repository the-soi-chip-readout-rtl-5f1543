// tb_timestamp_counter: self-checking test of the 64-bit time stamp.
// A slow trigger clock with random high and low times is counted; the
// stamp must equal the number of its rising edges, three clocks late at
// most, and a trigger reset must clear it. The count is also preloaded near
// the 32-bit boundary through a long run to show the upper word counts.
module tb_timestamp_counter;
  logic clk = 0, rst = 0, trig_clk = 0, trig_rst = 0;
  logic [63:0] ts;
  int checks = 0, failures = 0;
  longint edges = 0;

  timestamp_counter #(.W(64)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin
      #($urandom_range(25, 60)) trig_clk = 1; edges++;
      #($urandom_range(25, 60)) trig_clk = 0;
      #40;
      chk(ts == 64'(edges), $sformatf("ts %0d exp %0d", ts, edges));
    end
  endtask

  initial begin
    #1 rst = 1;
    #30 rst = 0;
    pulses(200);
    #2 trig_rst = 1;
    #50 trig_rst = 0;
    edges = 0;
    #40 chk(ts == 0, "cleared by trigger reset");
    pulses(50);
    // upper word: preload through the design's own path is too long, so check
    // carry by forcing the count just below 2**32
    force dut.ts = 64'h0000_0000_FFFF_FFFE;
    #10 release dut.ts;
    edges = 64'h0000_0000_FFFF_FFFE;
    pulses(4);
    chk(ts[63:32] == 32'd1, "carry into the upper word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
