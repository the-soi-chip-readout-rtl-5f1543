// tb_async_fifo: self-checking test of the dual-clock FIFO (pk_fifo).
// A 16-word instance is written on a 10 ns clock and read on a 7 ns clock,
// each side at random, in phases that fill and drain it. Every word read
// must be the next one written (order, no loss, no duplicate); the write
// side never accepts a word while full, wfree never claims more room than
// there is, and the FIFO must be seen full and empty.
module tb_async_fifo;
  localparam int AW = 4;
  logic rst = 0;
  logic wclk = 0, we = 0, wfull;
  logic [31:0] wdata = 0;
  logic [AW:0] wfree, rcount;
  logic rclk = 0, rd = 0, rempty;
  logic [31:0] rdata;
  int npopped = 0;
  int checks = 0, failures = 0, nfull = 0, nempty = 0, nread = 0, nwritten = 0;
  logic [31:0] q[$];
  bit fill_phase = 1;
  bit wstop = 0;
  logic pend = 0;

  async_fifo #(.W(32), .AW(AW)) dut (.*);

  always #5 wclk = !wclk;
  always #3.5 rclk = !rclk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: decides on the falling edge, the FIFO acts on the rising edge
  logic wpend = 0;
  always @(negedge wclk) if (!rst) begin
    if (wpend) nwritten++;
    // wfree may lag behind reads but must never promise room that is not there
    chk(int'(wfree) <= 2**AW - (nwritten - npopped), $sformatf("wfree %0d", wfree));
    if (wfull) nfull++;
    we    = !wstop && $urandom_range(0, 9) < (fill_phase ? 8 : 2);
    wdata = $urandom;
    wpend = we && !wfull;
    if (wpend) q.push_back(wdata);
  end

  // reader
  always @(negedge rclk) if (!rst) begin
    if (pend) begin
      chk(q.size() > 0, "read with nothing written");
      if (q.size() > 0) begin
        logic [31:0] e;
        e = q.pop_front();
        chk(rdata == e, $sformatf("rdata %h exp %h", rdata, e));
      end
      nread++;
    end
    if (rempty) nempty++;
    rd   = $urandom_range(0, 9) < (fill_phase ? 2 : 8);
    pend = rd && !rempty;
    if (pend) npopped++;
  end

  initial begin
    #1 rst = 1;
    #20 chk(wfull && wfree == 0, "full and no room while in reset");
    #13 rst = 0;
    repeat (12) begin
      fill_phase = 1; #3us;
      fill_phase = 0; #3us;
    end
    wstop = 1;
    #2us;
    chk(nread > 1000, $sformatf("words moved %0d", nread));
    chk(nread == nwritten, $sformatf("read %0d written %0d", nread, nwritten));
    chk(nfull > 5 && nempty > 5, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
