// pk_to_pfifo: the transfer state machine between pk_fifo and PFIFO.
//
// Runs in the 125 MHz domain. Whenever pk_fifo is not empty and PFIFO has
// room, it pops a word from pk_fifo and, one cycle later when the word is on
// pk_fifo's output, pushes it into PFIFO: up to one word per clock. Room is
// judged from PFIFO's fill count including the word still in flight, so the
// PFIFO full flag stops the transfer without losing a word. The moving of
// words and the stop on a full PFIFO follow the readout; the one-word-per-
// clock pipelining is this implementation's choice. stall counts cycles in
// which pk_fifo had data but PFIFO had no room. rst is synchronous.
module pk_to_pfifo #(
  parameter int unsigned PF_AW = 11
) (
  input  logic           clk,
  input  logic           rst,
  // pk_fifo read side
  input  logic           pk_empty,
  output logic           pk_rd,
  input  logic [31:0]    pk_rdata,
  // PFIFO write side
  input  logic [PF_AW:0] pf_count,
  output logic           pf_we,
  output logic [31:0]    pf_wdata,
  // statistics
  output logic [31:0]    moved,
  output logic [31:0]    stall
);
  localparam logic [PF_AW:0] PF_DEPTH = (PF_AW+1)'(1) << PF_AW;

  logic inflight, room;

  assign room     = (pf_count + (PF_AW+1)'(inflight)) < PF_DEPTH;
  assign pk_rd    = !pk_empty && room;
  assign pf_we    = inflight;
  assign pf_wdata = pk_rdata;

  always_ff @(posedge clk)
    if (rst) begin
      inflight <= 1'b0;
      moved    <= '0;
      stall    <= '0;
    end else begin
      inflight <= pk_rd;
      if (inflight)           moved <= moved + 1'b1;
      if (!pk_empty && !room) stall <= stall + 1'b1;
    end

  a_never_overfill: assert property (@(posedge clk) disable iff (rst)
    pf_we |-> pf_count < PF_DEPTH);
endmodule
