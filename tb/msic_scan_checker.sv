// msic_scan_checker: CUT model and reference model for one test-per-scan
// MSIC BIST (msic_bist_scan), used by the testbenches.
//
// The CUT is a small made-up combinational circuit: next-state
// next[i][p] = q[i][(p+1) mod L] ^ q[(i+1) mod M][p] ^ pi[p mod MS] and
// primary outputs po[b] = xor(q[b mod M]) ^ pi[b mod MS].
// The reference follows the procedure on its own, scan by scan (scan s is
// counted by capture strobes): seed = LFSR x^8 + x^6 + x^5 + x^4 + 1 stepped
// s/(2L)+1 times from 1; for the Johnson generator (GEN = 0) the vector is
// the Johnson vector after s+1 steps and chain i receives, at shift t, bit
// (i - t) mod L of it XOR S_i; for the scalable SIC counter (GEN = 1) scan s
// emits c = s mod L copies of ~p and then p (p = (s/L) mod 2), and chain i
// receives that stream delayed by i+1 shifts, XOR S_i. Model scan chains
// and a model MISR (x^16 + x^15 + x^13 + x^4 + 1, same input folding as the
// design) follow. Sampling is done on the falling clock edge, where the
// strobes say what the next rising edge will do.
// Checked: scan_in on every shift cycle, PIs constant while shifting and
// equal to the reference seed, chain contents at every capture, at most two
// circular transitions per chain (Johnson generator), the 2L patterns of a
// seed all distinct, every scan cell 1 in exactly L of them (Johnson
// generator: uniform distribution), and the signature once done.
module msic_scan_checker #(
  parameter int GEN    = 0,
  parameter int L      = 8,
  parameter int M      = 4,
  parameter int MS     = 8,
  parameter int N_PO   = 8,
  parameter int MISR_W = 16,
  parameter int T      = 2    // seeds in the run; the scans after 2L*T are the flush
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MS-1:0]       cut_pi,
  input  logic [M-1:0][L-1:0] cut_scan_q,
  input  logic [M-1:0]        scan_in,
  input  logic                se,
  input  logic                capture,
  input  logic                done,
  input  logic [MISR_W-1:0]   signature,
  output logic [N_PO-1:0]     cut_po,
  output logic [M-1:0][L-1:0] cut_next,
  output int                  checks,
  output int                  failures,
  output int                  n_shift,
  output int                  n_capture,
  output int                  n_seed,
  output int                  n_flush
);
  // CUT model
  always_comb begin
    for (int i = 0; i < M; i++)
      for (int p = 0; p < L; p++)
        cut_next[i][p] = cut_scan_q[i][(p + 1) % L] ^ cut_scan_q[(i + 1) % M][p] ^ cut_pi[p % MS];
    for (int b = 0; b < N_PO; b++) cut_po[b] = (^cut_scan_q[b % M]) ^ cut_pi[b % MS];
  end

  function automatic logic [MS-1:0] lfsr8(input logic [MS-1:0] s);
    return {s[MS-2:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [L-1:0] jvec(input int k);
    logic [L-1:0] v;
    for (int b = 0; b < L; b++) v[b] = (k <= L) ? (b < k) : (b >= k - L);
    return v;
  endfunction

  function automatic bit stream_bit(input longint pos);
    longint s, t, c, p, ll;
    if (pos < 0) return 1'b0;
    ll = longint'(L);
    s = pos / ll; t = pos % ll;
    c = s % ll; p = (s / ll) % 2;
    return (t < c) ? (p == 0) : (p != 0);
  endfunction

  logic [MISR_W-1:0] msig;
  // pattern uniqueness and balance within one seed
  logic [M*L-1:0] seed_pats[$];
  int ones_cnt[M][L];
  int bad_uniq = 0, bad_bal = 0;
  bit mq[M][L];
  int s_idx, t_idx, bad_in, bad_pi, bad_q, bad_tr;
  logic [MS-1:0] mseed;
  logic [MS-1:0] last_seed;
  bit finished;
  localparam int s_total = 2 * L * T;

  task automatic misr_step(input logic [MISR_W-1:0] din);
    logic fb;
    fb = msig[15] ^ msig[14] ^ msig[12] ^ msig[3];
    msig = {msig[MISR_W-2:0], fb} ^ din;
  endtask

  initial begin
    checks = 0; failures = 0; n_shift = 0; n_capture = 0; n_seed = 0; n_flush = 0;
    s_idx = 0; t_idx = 0; bad_in = 0; bad_pi = 0; bad_q = 0; bad_tr = 0;
    msig = '0; finished = 1'b0; last_seed = 8'h01;
    for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) mq[i][p] = 1'b0;
  end

  always @(negedge clk) if (rst_n && !finished) begin
    // reference seed of the current scan
    mseed = 8'h01;
    for (int n = 0; n <= s_idx / (2 * L); n++) mseed = lfsr8(mseed);
    if (se) begin
      logic [M-1:0] exp_in;
      logic [MISR_W-1:0] din;
      bit flushing;
      flushing = (s_idx >= s_total);
      for (int i = 0; i < M; i++) begin
        bit jb;
        if (GEN == 0) begin
          logic [L-1:0] v;
          v = jvec((s_idx + 1) % (2 * L));
          jb = v[(i - t_idx + L) % L];
        end else begin
          jb = stream_bit(longint'(s_idx) * longint'(L) + longint'(t_idx) - longint'(i) - 1);
        end
        exp_in[i] = jb ^ mseed[i];
      end
      if (!flushing) begin
        if (scan_in != exp_in) bad_in++;
        if (cut_pi != mseed) bad_pi++;
        n_shift++;
      end else n_flush++;
      din = '0;
      for (int i = 0; i < M; i++) din[i % MISR_W] ^= mq[i][L-1];
      misr_step(din);
      for (int i = 0; i < M; i++) begin
        for (int p = L - 1; p > 0; p--) mq[i][p] = mq[i][p-1];
        mq[i][0] = flushing ? scan_in[i] : exp_in[i];
      end
      t_idx++;
    end else if (capture) begin
      logic [MISR_W-1:0] din;
      int tr;
      for (int i = 0; i < M; i++) begin
        for (int p = 0; p < L; p++) if (cut_scan_q[i][p] != mq[i][p]) bad_q++;
        tr = 0;
        for (int p = 0; p < L; p++) if (cut_scan_q[i][p] != cut_scan_q[i][(p + 1) % L]) tr++;
        // a rotated Johnson code word XOR a constant: at most two transitions
        if (GEN == 0 && tr > 2) bad_tr++;
      end
      begin
        logic [M*L-1:0] key;
        key = cut_scan_q;
        foreach (seed_pats[q]) if (seed_pats[q] == key) bad_uniq++;
        seed_pats.push_back(key);
        for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) if (cut_scan_q[i][p]) ones_cnt[i][p]++;
        if (seed_pats.size() == 2 * L) begin
          // each scan cell is 1 in exactly L of the 2L patterns of a seed
          if (GEN == 0)
            for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) if (ones_cnt[i][p] != L) bad_bal++;
          seed_pats.delete();
          for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) ones_cnt[i][p] = 0;
        end
      end
      din = '0;
      for (int b = 0; b < N_PO; b++) din[(M + b) % MISR_W] ^= cut_po[b];
      misr_step(din);
      for (int i = 0; i < M; i++) for (int p = 0; p < L; p++) mq[i][p] = cut_next[i][p];
      if (cut_pi != last_seed) begin n_seed++; last_seed = cut_pi; end
      n_capture++;
      s_idx++;
      t_idx = 0;
    end
    if (done) begin
      finished = 1'b1;
      checks += 7;
      if (bad_uniq != 0) begin failures++; $display("FAIL: GEN%0d repeated pattern within a seed (%0d)", GEN, bad_uniq); end
      if (bad_bal != 0) begin failures++; $display("FAIL: GEN%0d scan cells not balanced (%0d)", GEN, bad_bal); end
      if (bad_in != 0) begin failures++; $display("FAIL: GEN%0d scan_in wrong %0d times", GEN, bad_in); end
      if (bad_pi != 0) begin failures++; $display("FAIL: GEN%0d PIs moved during shift %0d times", GEN, bad_pi); end
      if (bad_q != 0) begin failures++; $display("FAIL: GEN%0d chain contents wrong %0d bits", GEN, bad_q); end
      if (bad_tr != 0) begin failures++; $display("FAIL: GEN%0d chain with > 2 transitions", GEN); end
      if (signature != msig) begin
        failures++;
        $display("FAIL: GEN%0d signature %h, expected %h", GEN, signature, msig);
      end
    end
  end
endmodule
