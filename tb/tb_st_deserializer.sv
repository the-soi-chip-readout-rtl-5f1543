// tb_st_deserializer: self-checking test of the ST deserializer.
// Random 20-bit words are sent MSB first with the word enable high, with
// random idle gaps, back-to-back words and some words cut short (which must
// produce nothing). Each received word must equal the next complete word
// sent and arrive one clock after its last bit.
module tb_st_deserializer;
  logic st_clk = 0, rst = 1, sdata = 0, sen = 0, word_valid;
  logic [19:0] word;
  int checks = 0, failures = 0, nsent = 0, nrecv = 0, ncut = 0, lat_bad = 0;
  logic [19:0] q[$];
  int last_bit_cycle, cyc = 0;
  int qc[$];

  st_deserializer #(.W(20)) dut (.*);

  always #2 st_clk = !st_clk;
  always @(posedge st_clk) cyc++;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge st_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge st_clk) if (!rst && word_valid) begin
    nrecv++;
    chk(q.size() > 0, "word without a word sent");
    if (q.size() > 0) begin
      logic [19:0] e;
      e = q.pop_front();
      chk(word == e, $sformatf("word %h exp %h", word, e));
    end
    if (qc.size() > 0) chk(cyc == qc.pop_front(), "word valid in the clock after its last bit");
  end

  initial begin
    repeat (3) @(negedge st_clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic [19:0] w;
      int len;
      w   = 20'($urandom);
      len = ($urandom_range(0, 9) == 0) ? $urandom_range(1, 19) : 20;
      for (int b = 19; b >= 20 - len; b--) begin
        @(negedge st_clk);
        sen = 1; sdata = w[b];
        last_bit_cycle = cyc + 1;
      end
      if (len == 20) begin q.push_back(w); qc.push_back(last_bit_cycle); nsent++; end
      else ncut++;
      if (len < 20 || $urandom_range(0, 1)) begin
        repeat ($urandom_range(1, 5)) begin @(negedge st_clk); sen = 0; sdata = $urandom; end
      end
    end
    @(negedge st_clk); sen = 0;
    repeat (5) @(negedge st_clk);
    chk(nrecv == nsent, $sformatf("received %0d sent %0d", nrecv, nsent));
    chk(ncut > 5, "some words cut short");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
