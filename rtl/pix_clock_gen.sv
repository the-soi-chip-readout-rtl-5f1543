// pix_clock_gen: the clocks generator of the readout core.
//
// Divides the 125 MHz system clock into the front-end clock pk_clk, which
// also clocks the matrix readout and the on-chip ADC, and derives the Y
// matrix integration clock and the external ADC clock from it. Dividing the
// system clock by a register-set counter limit, the integration-clock limit
// and the ADC clock inversion follow the readout; the exact ratios are this
// implementation's choice:
//   pk_clk  toggles every pk_div+1 system cycles: f = 125 MHz / (2*(pk_div+1))
//   int_clk toggles every int_div+1 pk_clk periods
//   adc_clk = pk_clk, inverted when adc_inv is set
// All outputs come from flip-flops of the system clock (adc_clk through one
// XOR). pk_rise is a one-cycle system-clock pulse in the cycle before pk_clk
// rises. rst is synchronous, active high; during reset pk_clk keeps toggling
// at half the system clock, so that the reset synchronizers of the front-end
// domain see clock edges, and int_clk is held low.
module pix_clock_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] pk_div,
  input  logic [7:0] int_div,
  input  logic       adc_inv,
  output logic       pk_clk,
  output logic       pk_rise,
  output logic       adc_clk,
  output logic       int_clk
);
  logic [7:0] pcnt, icnt;
  logic       ptick;

  assign ptick   = (pcnt >= pk_div);
  assign pk_rise = ptick && !pk_clk;
  assign adc_clk = pk_clk ^ adc_inv;

  always_ff @(posedge clk)
    if (rst) begin
      pcnt    <= '0;
      icnt    <= '0;
      pk_clk  <= !pk_clk;  // keeps running so the front end can be reset
      int_clk <= 1'b0;
    end else begin
      if (ptick) begin
        pcnt   <= '0;
        pk_clk <= !pk_clk;
      end else begin
        pcnt <= pcnt + 1'b1;
      end
      if (pk_rise) begin
        if (icnt >= int_div) begin
          icnt    <= '0;
          int_clk <= !int_clk;
        end else begin
          icnt <= icnt + 1'b1;
        end
      end
    end
endmodule
