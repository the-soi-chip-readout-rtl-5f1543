// sync_fifo: single-clock FIFO, 2**AW words of W bits.
//
// Used as PFIFO, the 2k x 32 packet fifo between the transfer state machine
// and the processor, which polls its status and reads its output port. Its
// size is the readout's own number; the interface is this implementation's
// choice.
//
// we with full low stores wdata; rd with empty low pops a word, which appears
// on rdata after the next clk edge (one cycle latency). count is the fill
// level (0..2**AW). rst is synchronous, active high.
module sync_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic [AW:0]  count
);
  localparam logic [AW:0] DEPTH = (AW+1)'(1) << AW;

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wptr, rptr;
  logic         push, pop;

  assign count = wptr - rptr;
  assign full  = (count == DEPTH);
  assign empty = (count == '0);
  assign push  = we && !full;
  assign pop   = rd && !empty;

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= wdata;
    if (pop)  rdata <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk)
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
endmodule
