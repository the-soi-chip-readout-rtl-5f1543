// sync2: two-flop synchronizer for a W-bit value that changes one bit at a
// time (a level, or a Gray-coded pointer). Output lags the input by two clk
// edges. Clears to zero on rst.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
endmodule
