// tb_sync_fifo: self-checking test of the single-clock FIFO (PFIFO).
// A 16-word instance is pushed and popped at random against a queue model;
// data order, the one-cycle read latency, count, full and empty are checked,
// and the test drives the FIFO full and empty several times.
module tb_sync_fifo;
  localparam int AW = 4;
  logic clk = 0, rst = 1, we = 0, rd = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [AW:0] count;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [31:0] q[$];
  logic pend = 0;
  logic [31:0] exp_d;

  sync_fifo #(.W(32), .AW(AW)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      logic dw, dr;
      @(negedge clk);
      // check registered read of the previous cycle
      if (pend) chk(rdata == exp_d, $sformatf("rdata %h exp %h", rdata, exp_d));
      chk(count == ($bits(count))'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      chk(full == (q.size() == 2**AW), "full flag");
      chk(empty == (q.size() == 0), "empty flag");
      if (full) nfull++;
      if (empty) nempty++;
      // phases bias towards filling or draining
      dw = ((i / 300) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      dr = ((i / 300) % 2 == 0) ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 9) < 8);
      we = dw; rd = dr; wdata = $urandom;
      pend = 0;
      if (rd && q.size() > 0) begin exp_d = q.pop_front(); pend = 1; end
      if (we && !full) q.push_back(wdata);
    end
    chk(nfull > 10 && nempty > 10, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
