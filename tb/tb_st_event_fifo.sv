// tb_st_event_fifo: self-checking test of the ST event-forming FIFO.
// ST words are written on a 4 ns clock; events are read on a 10 ns clock.
// While ena is low no event may start even above the threshold. Then every
// event must be exactly 128 consecutive words with ev_frame high, in write
// order, separated by low frame cycles; a remainder below the threshold must
// stay in the FIFO until more words arrive.
module tb_st_event_fifo;
  localparam int EV = 128;
  logic rst = 0, st_clk = 0, pk_clk = 0, we = 0, wfull, ena = 0, ev_ready, ev_frame, ev_valid;
  logic [19:0] wdata = 0, ev_data;
  int checks = 0, failures = 0, nev = 0, run = 0, nwords = 0;
  logic [19:0] q[$];
  logic frame_q = 0;

  st_event_fifo #(.W(20), .AW(10), .EVENT_WORDS(EV)) dut (.*);

  always #2 st_clk = !st_clk;
  always #5 pk_clk = !pk_clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge st_clk);
      we = 1; wdata = 20'($urandom);
      q.push_back(wdata);
      @(negedge st_clk);
      we = 0;
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor on the read side
  always @(negedge pk_clk) if (rst == 0) begin
    chk(ev_frame == ev_valid, "frame and valid together");
    if (ev_valid) begin
      logic [19:0] e;
      e = (q.size() > 0) ? q.pop_front() : 20'hx;
      chk(ev_data == e, $sformatf("ev_data %h exp %h", ev_data, e));
      run++; nwords++;
    end
    if (!ev_frame && frame_q) begin
      nev++;
      chk(run == EV, $sformatf("event length %0d", run));
      run = 0;
    end
    frame_q = ev_frame;
  end

  initial begin
    #1 rst = 1;
    #50 rst = 0;
    #100;
    send(300);
    #500;
    chk(ev_ready, "threshold reached");
    chk(nwords == 0, "no event while disabled");
    ena = 1;
    #4us;
    chk(nev == 2, $sformatf("two events, saw %0d", nev));
    chk(!ev_ready, "remainder below threshold");
    send(84);
    #3us;
    chk(nev == 3, $sformatf("three events, saw %0d", nev));
    chk(nwords == 384, $sformatf("words %0d", nwords));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
