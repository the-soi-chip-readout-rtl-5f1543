// async_fifo: dual-clock FIFO, 2**AW words of W bits.
//
// Used as pk_fifo, the 16k x 32 front-end fifo that carries frames from the
// front-end clock (pk_clk) into the 125 MHz domain, and as the storage of the
// 1k x 20 ST event-forming FIFO. The depth of pk_fifo is the readout's own
// number; the construction is a textbook one chosen here: binary pointers one
// bit wider than the address, exchanged between the domains in Gray code
// through two-flop synchronizers.
//
// Write side (wclk): a word is stored on a wclk edge with we high and wfull
//   low; we while wfull is ignored. wfree is the number of free words as the
//   write side sees it (pessimistic by the synchronizer delay). Until its
//   reset is released the write side shows wfull high and wfree 0.
// Read side (rclk): rd with rempty low pops a word; rdata holds it from the
//   next rclk edge on (one cycle latency). rcount is the fill level as the
//   read side sees it.
// rst is asynchronous and resets both sides; it is synchronized into each
// domain before release.
module async_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 14
) (
  input  logic          rst,
  // write side
  input  logic          wclk,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic          wfull,
  output logic [AW:0]   wfree,
  // read side
  input  logic          rclk,
  input  logic          rd,
  output logic [W-1:0]  rdata,
  output logic          rempty,
  output logic [AW:0]   rcount
);
  localparam logic [AW:0] DEPTH = (AW+1)'(1) << AW;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [W-1:0] mem [2**AW];

  logic wrst, rrst;
  reset_sync u_wrst (.clk(wclk), .rst_in(rst), .rst_out(wrst));
  reset_sync u_rrst (.clk(rclk), .rst_in(rst), .rst_out(rrst));

  // ---- write domain ----
  logic [AW:0] wptr, wptr_gray, rptr_gray_w, rptr_w, wcount;
  logic        wpush;
  assign wcount = wptr - rptr_w;
  // while the write side is held in reset it reports full, so a writer that
  // starts right after the reset release never loses a word
  assign wfull  = wrst || (wcount == DEPTH);
  assign wfree  = wrst ? '0 : DEPTH - wcount;
  assign wpush  = we && !wfull;

  always_ff @(posedge wclk) if (wpush) mem[wptr[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or posedge wrst)
    if (wrst) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (wpush) begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= bin2gray(wptr + 1'b1);
    end

  // ---- read domain ----
  logic [AW:0] rptr, rptr_gray, wptr_gray_r, wptr_r;
  logic        rpop;
  assign rcount = wptr_r - rptr;
  assign rempty = (rcount == '0);
  assign rpop   = rd && !rempty;

  always_ff @(posedge rclk) if (rpop) rdata <= mem[rptr[AW-1:0]];

  always_ff @(posedge rclk or posedge rrst)
    if (rrst) begin
      rptr      <= '0;
      rptr_gray <= '0;
    end else if (rpop) begin
      rptr      <= rptr + 1'b1;
      rptr_gray <= bin2gray(rptr + 1'b1);
    end

  // ---- pointer exchange ----
  sync2 #(.W(AW+1)) u_r2w (.clk(wclk), .rst(wrst), .d(rptr_gray), .q(rptr_gray_w));
  sync2 #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rrst), .d(wptr_gray), .q(wptr_gray_r));
  assign rptr_w = gray2bin(rptr_gray_w);
  assign wptr_r = gray2bin(wptr_gray_r);

  // The write side never counts more words than the memory holds.
  a_no_overrun: assert property (@(posedge wclk) disable iff (wrst) wcount <= DEPTH);
endmodule
