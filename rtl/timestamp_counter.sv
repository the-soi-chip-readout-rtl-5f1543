// timestamp_counter: the 64-bit time stamp of the front end.
//
// The counter is driven by the external trigger clock and trigger reset, as
// in the readout. Both trigger lines are asynchronous to pk_clk; here they
// are brought in through two-flop synchronizers, every rising edge of the
// trigger clock adds one, and a high trigger reset clears the count (reset
// wins over counting). This requires the trigger clock to run below half of
// pk_clk, which is this implementation's choice of how to cross domains.
// The stamp lags the trigger lines by three pk_clk edges. rst clears it
// asynchronously.
module timestamp_counter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         trig_clk,
  input  logic         trig_rst,
  output logic [W-1:0] ts
);
  logic [1:0] s;
  logic       tclk_q;

  sync2 #(.W(2)) u_sync (.clk(clk), .rst(rst), .d({trig_clk, trig_rst}), .q(s));

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      tclk_q <= 1'b0;
      ts     <= '0;
    end else begin
      tclk_q <= s[1];
      if (s[0])                 ts <= '0;
      else if (s[1] && !tclk_q) ts <= ts + 1'b1;
    end
endmodule
