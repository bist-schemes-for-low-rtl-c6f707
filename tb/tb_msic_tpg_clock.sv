// tb_msic_tpg_clock: runs the test-per-clock MSIC generator at its default
// 16 x 16 grid for four seeds. A reference model (Johnson vector after k
// steps, and its own LFSR x^16 + x^15 + x^13 + x^4 + 1 from the reset seed)
// predicts every pattern: X_{cN+r} = J_r xor S_c. Checked for each pattern:
// the PI values, that consecutive patterns of one seed differ in exactly MC
// inputs (one per column: the mean transition density 1/N), that the 2N
// patterns of a seed are distinct and that every input is 1 in exactly N of
// them (uniform distribution); and the pattern count and the cycle
// count from start to done, 2 + (N+1) + T(1+2N).
module tb_msic_tpg_clock;
  localparam int N = 16, MC = 16, T = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] test_len = 16'(T);
  logic [N*MC-1:0] pi, prev_pi;
  logic pattern_valid, busy, done;
  logic [N-1:0] johnson;
  logic [MC-1:0] seed;
  int checks = 0, failures = 0;

  msic_tpg_clock dut (.clk, .rst_n, .start, .test_len, .pi, .pattern_valid, .busy, .done,
                      .johnson, .seed);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] jvec(input int k);
    logic [N-1:0] v;
    for (int b = 0; b < N; b++) v[b] = (k <= N) ? (b < k) : (b >= k - N);
    return v;
  endfunction

  function automatic logic [MC-1:0] lfsr_next(input logic [MC-1:0] s);
    return {s[MC-2:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  int n_pat = 0, k = 0, cyc = 0, in_seed = 0, bad_pi = 0, bad_sic = 0, dup = 0, bad_bal = 0;
  int ones[N*MC];
  logic [MC-1:0] mseed = 16'h0001;
  logic [N*MC-1:0] block[$];
  bit counting = 1'b0;

  always @(posedge clk) if (counting && !done) cyc++;

  always @(negedge clk) if (rst_n && pattern_valid) begin
    logic [N*MC-1:0] e;
    logic [N-1:0] jv;
    if (in_seed == 0) begin mseed = lfsr_next(mseed); block.delete(); end
    k++;
    jv = jvec(k % (2 * N));
    for (int c = 0; c < MC; c++) for (int r = 0; r < N; r++) e[c*N + r] = jv[r] ^ mseed[c];
    if (pi != e) bad_pi++;
    if (in_seed > 0 && $countones(pi ^ prev_pi) != MC) bad_sic++;
    foreach (block[q]) if (block[q] == pi) dup++;
    block.push_back(pi);
    for (int b = 0; b < N * MC; b++) if (pi[b]) ones[b]++;
    if (in_seed == 2 * N - 1) begin
      // uniform distribution: every input is 1 in exactly N of the seed's 2N patterns
      for (int b = 0; b < N * MC; b++) begin
        if (ones[b] != N) bad_bal++;
        ones[b] = 0;
      end
    end
    prev_pi = pi;
    n_pat++;
    in_seed = (in_seed + 1) % (2 * N);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; counting = 1'b1; @(negedge clk); start = 1'b0;
    wait (done);
    repeat (2) @(negedge clk);
    chk(bad_pi == 0, $sformatf("PI values (%0d wrong)", bad_pi));
    chk(bad_sic == 0, "consecutive patterns differ in exactly MC inputs");
    chk(dup == 0, "2N distinct patterns per seed");
    chk(bad_bal == 0, "every input 1 in exactly N of 2N patterns per seed");
    chk(n_pat == 2 * N * T, $sformatf("pattern count %0d", n_pat));
    chk(cyc + 1 == 2 + (N + 1) + T * (1 + 2 * N), $sformatf("cycles to done %0d", cyc + 1));
    chk(seed == mseed, "final seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
