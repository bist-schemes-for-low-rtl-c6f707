// tb_ssic_counter: checks the scalable SIC counter (L = 16, M = 4).
// Each scan is SE=0 for two cycles (the second with CLK2, loading the
// subtractor) followed by L cycles of SE=1 with CLK2. For scan s the
// expected serial code word is c copies of ~p then L-c copies of p, with
// c = s mod L and p = (s / L) mod 2. Checked: m_johnson against that, the
// shift register against the expected delayed stream, at most one
// transition per code word, 2L distinct code words per period, adder
// stepping only on the falling edge of SE, hold without CLK2.
module tb_ssic_counter;
  localparam int L = 16, M = 4, K = $clog2(L);
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, se = 1'b0;
  logic [M-1:0] sr;
  logic m_johnson, phase;
  logic [K-1:0] count;
  int checks = 0, failures = 0;

  ssic_counter #(.L(L), .M(M)) dut (.clk, .rst_n, .clk2_en(en), .se, .sr, .m_johnson, .count, .phase);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit hist[$];          // every bit shifted in so far
    logic [L-1:0] words[$];
    logic [L-1:0] w;
    int c, p, tr, mism, srmis;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(sr == '0 && count == '0 && phase == 1'b0, "reset state");
    for (int s = 0; s < 3 * 2 * L; s++) begin
      // SE low: two cycles, CLK2 on the second
      se = 1'b0; en = 1'b0; @(negedge clk);
      chk(count == K'(s % L) && phase == ((s / L) % 2), $sformatf("adder value for scan %0d", s));
      en = 1'b1; @(negedge clk);
      // a held SE=0 must not step the adder again
      chk(count == K'(s % L), "adder steps once per SE fall");
      c = s % L; p = (s / L) % 2;
      se = 1'b1; mism = 0; srmis = 0;
      #1;
      for (int t = 0; t < L; t++) begin
        bit expb;
        expb = (t < c) ? !p : p;
        if (m_johnson != expb) mism++;
        w[t] = m_johnson;
        hist.push_back(expb);
        @(negedge clk);
        for (int i = 0; i < M; i++) begin
          int idx;
          idx = hist.size() - 1 - i;
          if (sr[i] != ((idx >= 0) ? hist[idx] : 1'b0)) srmis++;
        end
      end
      chk(mism == 0, $sformatf("code word of scan %0d", s));
      chk(srmis == 0, $sformatf("shift register during scan %0d", s));
      tr = 0;
      for (int t = 1; t < L; t++) if (w[t] != w[t-1]) tr++;
      chk(tr <= 1, "at most one transition per code word");
      if (s < 2 * L) begin
        foreach (words[q]) if (words[q] == w) chk(1'b0, "repeated code word");
        words.push_back(w);
      end else begin
        chk(words[s % (2 * L)] == w, "sequence periodic in 2L scans");
      end
    end
    chk(words.size() == 2 * L, "2L code words per period");
    // hold without CLK2 (SE=1)
    en = 1'b0; w[M-1:0] = sr;
    repeat (3) @(negedge clk);
    chk(sr == w[M-1:0], "shift register holds without CLK2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
