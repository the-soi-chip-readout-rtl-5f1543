// frame_gen: artificial event frames for sources without a frame structure.
//
// The on-chip ADC delivers a sample every clock with no frame signal; the
// readout frames it with a counter, 1024 words per event. The same counter
// frames the test modes. While ena is high this block passes one word per
// clk cycle with frame and valid high, for size words, then holds frame low
// for GAP cycles and starts the next frame. When ena falls, a frame already
// running is completed first. Outputs are registered (one cycle after the
// input word). The 1024-word event is the readout's; the GAP spacing and
// finishing a started frame are choices of this implementation. size = 0
// produces nothing. rst is asynchronous, active high.
module frame_gen #(
  parameter int unsigned W   = 32,
  parameter int unsigned SW  = 11,
  parameter int unsigned GAP = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ena,
  input  logic [SW-1:0] size,
  input  logic [W-1:0]  din,
  output logic          frame,
  output logic          valid,
  output logic [W-1:0]  dout
);
  localparam int unsigned GW = $clog2(GAP + 1);

  logic [SW-1:0] n;
  logic [GW-1:0] gap;
  logic          run;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      n     <= '0;
      gap   <= '0;
      run   <= 1'b0;
      frame <= 1'b0;
      valid <= 1'b0;
      dout  <= '0;
    end else begin
      frame <= 1'b0;
      valid <= 1'b0;
      if (run) begin
        frame <= 1'b1;
        valid <= 1'b1;
        dout  <= din;
        n     <= n + 1'b1;
        if (n == size - 1'b1) begin
          run <= 1'b0;
          gap <= GW'(GAP);
        end
      end else if (gap != '0) begin
        gap <= gap - 1'b1;
      end else if (ena && size != '0) begin
        run <= 1'b1;
        n   <= '0;
      end
    end
endmodule
