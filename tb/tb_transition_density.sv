// tb_transition_density: input transition density of the test-per-clock
// MSIC generator at its default 16 x 16 grid, against a pseudorandom
// source of the same width.
// Eight seeds (256 patterns) are applied. For every pair of consecutive
// patterns, the number of the 256 primary inputs that toggle is summed;
// density = toggles / (patterns - 1) / 256. The pseudorandom reference draws
// each 256-bit pattern afresh from $urandom, which is the behaviour of a wide
// LFSR source (about 1/2). Checked: inside a seed exactly 16 inputs toggle
// per pattern (1/N); over the whole run, seed changes included, the
// density stays below 2/N; the pseudorandom reference lies between 0.45 and
// 0.55; the reduction is at least 4x.
// The test-per-scan BIST (Johnson counter, 4 chains of 8 cells, 2 seeds)
// runs alongside: the toggles of each chain's scan-in bit during shifting
// are counted per L-cycle scan; each scan may toggle at most twice per
// chain, so the scan-in density stays at or below 2/L.
module tb_transition_density;
  import msic_pkg::*;
  localparam int N = 16, MC = 16, T = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] test_len = 16'(T);
  logic [N*MC-1:0] pi, prev_pi, rnd, prev_rnd;
  logic pattern_valid, busy, done;
  logic [N-1:0] johnson;
  logic [MC-1:0] seed;
  int checks = 0, failures = 0;

  msic_tpg_clock dut (.clk, .rst_n, .start, .test_len, .pi, .pattern_valid, .busy, .done,
                      .johnson, .seed);

  // test-per-scan instance and its CUT model / reference
  localparam int L = 8, M = 4;
  logic sbusy, sdone, sse, scap;
  logic [7:0] spi, spo;
  logic [M-1:0][L-1:0] sq, snx;
  logic [M-1:0] ssi, ssi_prev;
  logic [15:0] ssig;
  int sck, sf, ssh, scp, ssd, sfl;
  msic_bist_scan dut_s (
    .clk, .rst_n, .start, .test_len(16'd2), .busy(sbusy), .done(sdone),
    .cut_pi(spi), .cut_scan_q(sq), .cut_po(spo), .cut_next(snx),
    .scan_in(ssi), .se(sse), .capture(scap), .signature(ssig));
  msic_scan_checker #(.GEN(0), .L(L), .M(M), .T(2)) chk_s (
    .clk, .rst_n, .cut_pi(spi), .cut_scan_q(sq), .scan_in(ssi), .se(sse), .capture(scap),
    .done(sdone), .signature(ssig), .cut_po(spo), .cut_next(snx),
    .checks(sck), .failures(sf), .n_shift(ssh), .n_capture(scp), .n_seed(ssd), .n_flush(sfl));

  int s_tog = 0, s_tog_scan[M], s_max = 0, s_cycles = 0, s_t = 0;
  bit s_fin = 1'b0;
  always @(negedge clk) if (rst_n && !s_fin) begin
    if (sdone) s_fin = 1'b1;
    else if (sse && !chk_s.finished && chk_s.s_idx < 2 * L * 2) begin
      for (int i = 0; i < M; i++)
        if (s_t > 0 && ssi[i] != ssi_prev[i]) begin s_tog++; s_tog_scan[i]++; end
      ssi_prev = ssi;
      s_cycles++;
      s_t++;
      if (s_t == L) begin
        for (int i = 0; i < M; i++) begin
          if (s_tog_scan[i] > s_max) s_max = s_tog_scan[i];
          s_tog_scan[i] = 0;
        end
        s_t = 0;
      end
    end
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint tog_msic = 0, tog_rnd = 0;
  int n_pat = 0, in_seed = 0, bad_in_seed = 0;

  always @(negedge clk) if (rst_n && pattern_valid) begin
    for (int w = 0; w < N * MC / 32; w++) rnd[w*32 +: 32] = $urandom;
    if (n_pat > 0) begin
      tog_msic += $countones(pi ^ prev_pi);
      tog_rnd  += $countones(rnd ^ prev_rnd);
      if (in_seed != 0 && $countones(pi ^ prev_pi) != MC) bad_in_seed++;
    end
    prev_pi = pi;
    prev_rnd = rnd;
    n_pat++;
    in_seed = (in_seed + 1) % (2 * N);
  end

  initial begin
    real d_msic, d_rnd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done && sdone);
    repeat (2) @(negedge clk);
    d_msic = real'(tog_msic) / real'(n_pat - 1) / real'(N * MC);
    d_rnd  = real'(tog_rnd) / real'(n_pat - 1) / real'(N * MC);
    $display("patterns=%0d  MSIC density=%f  pseudorandom density=%f  ratio=%f",
             n_pat, d_msic, d_rnd, d_rnd / d_msic);
    chk(n_pat == 2 * N * T, "pattern count");
    chk(bad_in_seed == 0, "exactly MC toggles per pattern inside a seed");
    chk(d_msic >= 1.0 / N && d_msic < 2.0 / N, "MSIC density between 1/N and 2/N");
    chk(d_rnd > 0.45 && d_rnd < 0.55, "pseudorandom density near 1/2");
    chk(d_rnd / d_msic >= 4.0, "at least 4x fewer input transitions");
    $display("scan-in: %0d toggles in %0d chain-shift cycles (density %f), at most %0d per chain per scan",
             s_tog, s_cycles * M, real'(s_tog) / real'(s_cycles * M), s_max);
    chk(s_cycles == 2 * 2 * L * L, "scan-in cycles counted");
    chk(s_max <= 2, "at most two scan-in toggles per chain per scan");
    chk(real'(s_tog) / real'(s_cycles * M) <= 2.0 / L, "scan-in density at most 2/L");
    checks += sck;
    failures += sf;
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
