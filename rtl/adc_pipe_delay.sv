// adc_pipe_delay: programmable delay for the chip's frame control lines.
//
// The external ADC delivers a sample several clock cycles after it was
// taken (its pipeline latency). The readout's ADC pipeline delay setting
// (reset value 6 stages) tells how many pk_clk cycles; this block delays
// the W control bits (event frame and write enable) by that many cycles,
// 0..MAX_DELAY, so that they line up with the ADC data. Which signals are
// delayed is this implementation's reading of the setting. delay = 0 passes
// the input straight through; otherwise the output is taken from a shift
// register tap. rst clears the shift register.
module adc_pipe_delay #(
  parameter int unsigned W         = 2,
  parameter int unsigned MAX_DELAY = 15
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,
  input  logic [W-1:0]                 d,
  output logic [W-1:0]                 q
);
  logic [W-1:0] sh [1:MAX_DELAY];

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      for (int i = 1; i <= int'(MAX_DELAY); i++) sh[i] <= '0;
    end else begin
      sh[1] <= d;
      for (int i = 2; i <= int'(MAX_DELAY); i++) sh[i] <= sh[i-1];
    end

  always_comb begin
    q = d;
    for (int i = 1; i <= int'(MAX_DELAY); i++)
      if (int'(delay) == i) q = sh[i];
  end
endmodule
