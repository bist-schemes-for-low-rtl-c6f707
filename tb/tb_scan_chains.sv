// tb_scan_chains: checks M = 4 scan chains of L = 8 cells against a
// bit-array model under random shift, capture and idle cycles: shifting
// only with SE=1 and shift_en, capture only with SE=0 and capture_en,
// scan_out the last cell of each chain.
module tb_scan_chains;
  localparam int M = 4, L = 8;
  logic clk = 1'b0, rst_n = 1'b0, se = 1'b0, sh = 1'b0, cap = 1'b0;
  logic [M-1:0] scan_in, scan_out;
  logic [M-1:0][L-1:0] d, q;
  int checks = 0, failures = 0;
  bit mdl[M][L];
  int n_shift = 0, n_cap = 0;

  scan_chains #(.M(M), .L(L)) dut (.clk, .rst_n, .se, .shift_en(sh), .capture_en(cap),
                                   .scan_in, .d, .q, .scan_out);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    int bad;
    bad = 0;
    for (int i = 0; i < M; i++) begin
      for (int p = 0; p < L; p++) if (q[i][p] != mdl[i][p]) bad++;
      if (scan_out[i] != mdl[i][L-1]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare("reset");
    for (int n = 0; n < 2000; n++) begin
      se = $urandom; sh = $urandom; cap = $urandom; scan_in = $urandom;
      for (int i = 0; i < M; i++) d[i] = L'($urandom);
      @(negedge clk);
      if (se && sh) begin
        n_shift++;
        for (int i = 0; i < M; i++) begin
          for (int p = L - 1; p > 0; p--) mdl[i][p] = mdl[i][p-1];
          mdl[i][0] = scan_in[i];
        end
      end else if (!se && cap) begin
        n_cap++;
        for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) mdl[i][p] = d[i][p];
      end
      compare($sformatf("cycle %0d se=%b sh=%b cap=%b", n, se, sh, cap));
    end
    checks++;
    if (n_shift == 0 || n_cap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
