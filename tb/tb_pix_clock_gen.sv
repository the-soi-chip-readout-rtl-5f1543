// tb_pix_clock_gen: self-checking test of the clocks generator.
// For several pk_clk limits the pk_clk period must be 2*(limit+1) system
// clocks with a 50% duty cycle, pk_rise must precede each rising edge, the
// integration clock period must be 2*(int_limit+1) pk_clk periods, and the
// ADC clock must follow pk_clk, inverted when asked.
module tb_pix_clock_gen;
  logic clk = 0, rst = 0, adc_inv = 0;
  logic [7:0] pk_div = 0, int_div = 8'h0F;
  logic pk_clk, pk_rise, adc_clk, int_clk;
  int checks = 0, failures = 0;

  pix_clock_gen dut (.*);

  always #4 clk = !clk;  // 125 MHz

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count system clocks between pk_clk edges
  int hi = 0, lo = 0, sys_since_rise = 0;
  int last_period = 0, last_high = 0;
  logic pk_q = 0, rise_seen = 0;
  // tracks during reset too (pk_clk keeps running), checks only after it
  always @(negedge clk) begin
    if (pk_rise) rise_seen = 1;
    if (pk_clk && !pk_q) begin
      if (!rst) chk(rise_seen, "pk_rise before the rising edge");
      rise_seen = 0;
      last_period = sys_since_rise;
      sys_since_rise = 0;
    end
    if (!pk_clk && pk_q) last_high = sys_since_rise;
    sys_since_rise++;
    if (!rst) chk(adc_clk == (pk_clk ^ adc_inv), "adc clock");
    pk_q = pk_clk;
  end

  // count pk_clk rising edges per int_clk period
  int pk_since = 0, int_period = 0;
  logic int_q = 0;
  always @(posedge pk_clk) begin
    pk_since++;
    if (int_clk && !int_q) begin int_period = pk_since; pk_since = 0; end
    int_q = int_clk;
  end

  initial begin
    #1 rst = 1;
    #20 rst = 0;
    for (int k = 0; k < 4; k++) begin
      int dv;
      dv = (k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? 4 : 9;
      pk_div = 8'(dv);
      adc_inv = k[0];
      repeat (80 * (dv + 1)) @(negedge clk);
      chk(last_period == 2 * (dv + 1), $sformatf("div %0d: period %0d", dv, last_period));
      chk(last_high == dv + 1, $sformatf("div %0d: high %0d", dv, last_high));
    end
    pk_div = 0;
    for (int k = 0; k < 2; k++) begin
      int_div = (k == 0) ? 8'h0F : 8'h03;
      repeat (400) @(negedge clk);
      chk(int_period == 2 * (int'(int_div) + 1), $sformatf("int period %0d", int_period));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
