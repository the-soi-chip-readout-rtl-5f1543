// tb_adc_pipe_delay: self-checking test of the ADC pipeline delay.
// For every setting 0..15 a random 2-bit stream is applied; the output must
// be the input of exactly that many clocks earlier (0: the same cycle).
module tb_adc_pipe_delay;
  logic clk = 0, rst = 0;
  logic [3:0] delay = 0;
  logic [1:0] d = 0, q;
  logic [1:0] hist [64];
  int checks = 0, failures = 0, cyc = 0;

  adc_pipe_delay #(.W(2), .MAX_DELAY(15)) dut (.*);

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

  initial begin
    #1 rst = 1;
    #20 rst = 0;
    for (int s = 0; s <= 15; s++) begin
      delay = 4'(s);
      for (int i = 0; i < 80; i++) begin
        @(negedge clk);
        d = 2'($urandom);
        hist[cyc % 64] = d;
        #1;
        if (i >= 16)
          chk(q == hist[(cyc - s + 64) % 64], $sformatf("delay %0d: q %b exp %b", s, q, hist[(cyc - s + 64) % 64]));
        cyc++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
