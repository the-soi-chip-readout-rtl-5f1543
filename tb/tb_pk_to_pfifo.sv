// tb_pk_to_pfifo: self-checking test of the transfer state machine.
// A 16-word FIFO stands in for pk_fifo and an 8-word FIFO for PFIFO. Words
// go in at random, PFIFO is read at random and in a slow phase so that it
// fills; every word must arrive once, in order, PFIFO must never be written
// while full (stall counted instead), and with PFIFO drained every clock the
// transfer must reach one word per clock.
module tb_pk_to_pfifo;
  logic clk = 0, rst = 1;
  logic src_we = 0, src_full, pk_rd, pk_empty;
  logic [31:0] src_wdata = 0, pk_rdata;
  logic [4:0] src_count;
  logic pf_we, pf_full, pf_rd = 0, pf_empty;
  logic [31:0] pf_wdata, pf_rdata, moved, stall;
  logic [3:0] pf_count;
  int checks = 0, failures = 0, nin = 0, nout = 0, slow = 1;
  logic [31:0] q[$];
  logic pend = 0;

  sync_fifo #(.W(32), .AW(4)) u_src (
    .clk(clk), .rst(rst), .we(src_we), .wdata(src_wdata), .full(src_full),
    .rd(pk_rd), .rdata(pk_rdata), .empty(pk_empty), .count(src_count));

  pk_to_pfifo #(.PF_AW(3)) dut (
    .clk(clk), .rst(rst), .pk_empty(pk_empty), .pk_rd(pk_rd), .pk_rdata(pk_rdata),
    .pf_count(pf_count), .pf_we(pf_we), .pf_wdata(pf_wdata), .moved(moved), .stall(stall));

  sync_fifo #(.W(32), .AW(3)) u_pf (
    .clk(clk), .rst(rst), .we(pf_we), .wdata(pf_wdata), .full(pf_full),
    .rd(pf_rd), .rdata(pf_rdata), .empty(pf_empty), .count(pf_count));

  always #4 clk = !clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (pf_we) chk(!pf_full, "PFIFO written while full");
    if (pend) begin
      logic [31:0] e;
      e = (q.size() > 0) ? q.pop_front() : 32'hDEAD_BEEF;
      chk(pf_rdata == e, $sformatf("word %h exp %h", pf_rdata, e));
      nout++;
    end
    pf_rd = slow ? ($urandom_range(0, 9) < 3) : 1'b1;
    pend  = pf_rd && !pf_empty;
    src_we    = (nin < 2000) && $urandom_range(0, 9) < 7;
    src_wdata = $urandom;
    if (src_we && !src_full) begin q.push_back(src_wdata); nin++; end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (nin >= 1000);
    slow = 0;
    wait (nin == 2000);
    repeat (50) @(negedge clk);
    chk(nout == 2000 && moved == 2000, $sformatf("out %0d moved %0d", nout, moved));
    chk(stall > 0, "PFIFO full stalled the transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one word per clock while both sides allow it
  int busy = 0, moved_busy = 0;
  always @(negedge clk) if (!rst && !slow) begin
    if (!pk_empty && (int'(pf_count) + int'(pf_we)) < 8) busy++;
    if (pf_we) moved_busy++;
  end
  initial begin
    wait (nin == 2000);
    repeat (40) @(negedge clk);
    chk(moved_busy >= busy - 2, $sformatf("rate: moved %0d in %0d ready cycles", moved_busy, busy));
  end
endmodule
