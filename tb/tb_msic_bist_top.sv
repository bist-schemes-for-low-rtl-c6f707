// tb_msic_bist_top: end-to-end run of the whole design at its default sizes.
// All three generators run at once from one reset:
//   test-per-clock (16 x 16 grid), 3 seeds: every pattern is compared with
//     J_r xor S_c from a reference Johnson sequence and LFSR; consecutive
//     patterns must differ in exactly 16 inputs;
//   test-per-scan with the Johnson counter (4 x 8 chains), 3 seeds, and
//   test-per-scan with the scalable SIC counter (4 x 32 chains), 1 seed:
//     each against msic_scan_checker (scan-in bits, chain contents, PIs held
//     during shifting, signature) and a made-up CUT.
// The per-clock generator is then started a second time to show a restart.
// Each mechanism of the design is counted and must occur: Johnson counter
// initialisation, seed steps, Johnson steps, circular shifting, capture,
// flush, scalable-counter subtractor load and count-down, its phase change
// (1s to 0s) and the per-clock pattern strobe.
module tb_msic_bist_top;
  import msic_pkg::*;
  localparam int N = 16, MC = 16, PL = 8, PM = 4, SL = 32, SM = 4;
  localparam int PC_T = 3, PS_T = 3, SS_T = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pc_start = 1'b0, ps_start = 1'b0, ss_start = 1'b0;
  logic [15:0] pc_test_len = 16'(PC_T), ps_test_len = 16'(PS_T), ss_test_len = 16'(SS_T);
  logic [N*MC-1:0] pc_pi, prev_pi;
  logic pc_pattern_valid, pc_busy, pc_done;
  logic [N-1:0] pc_johnson;
  logic [MC-1:0] pc_seed;
  logic [7:0] ps_cut_pi, ss_cut_pi, ps_cut_po, ss_cut_po;
  logic [PM-1:0][PL-1:0] ps_cut_scan_q, ps_cut_next;
  logic [SM-1:0][SL-1:0] ss_cut_scan_q, ss_cut_next;
  logic ps_capture, ss_capture, ps_busy, ss_busy, ps_done, ss_done, ps_se, ss_se;
  logic [15:0] ps_signature, ss_signature;
  logic [PM-1:0] ps_scan_in;
  logic [SM-1:0] ss_scan_in;
  int checks = 0, failures = 0;
  int ck0, f0, sh0, cp0, sd0, fl0, ck1, f1, sh1, cp1, sd1, fl1;

  msic_bist_top dut (.*);

  msic_scan_checker #(.GEN(0), .L(PL), .M(PM), .T(PS_T)) chk_ps (
    .clk, .rst_n, .cut_pi(ps_cut_pi), .cut_scan_q(ps_cut_scan_q), .scan_in(ps_scan_in),
    .se(ps_se), .capture(ps_capture), .done(ps_done), .signature(ps_signature),
    .cut_po(ps_cut_po), .cut_next(ps_cut_next),
    .checks(ck0), .failures(f0), .n_shift(sh0), .n_capture(cp0), .n_seed(sd0), .n_flush(fl0));
  msic_scan_checker #(.GEN(1), .L(SL), .M(SM), .T(SS_T)) chk_ss (
    .clk, .rst_n, .cut_pi(ss_cut_pi), .cut_scan_q(ss_cut_scan_q), .scan_in(ss_scan_in),
    .se(ss_se), .capture(ss_capture), .done(ss_done), .signature(ss_signature),
    .cut_po(ss_cut_po), .cut_next(ss_cut_next),
    .checks(ck1), .failures(f1), .n_shift(sh1), .n_capture(cp1), .n_seed(sd1), .n_flush(fl1));

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

  // ---- test-per-clock reference
  int n_pat = 0, k = 0, in_seed = 0, bad_pi = 0, bad_sic = 0;
  logic [MC-1:0] mseed = 16'h0001;
  always @(negedge clk) if (rst_n && pc_pattern_valid) begin
    logic [N*MC-1:0] e;
    logic [N-1:0] jv;
    if (in_seed == 0) mseed = {mseed[MC-2:0], mseed[15] ^ mseed[14] ^ mseed[12] ^ mseed[3]};
    k++;
    jv = jvec(k % (2 * N));
    for (int c = 0; c < MC; c++) for (int r = 0; r < N; r++) e[c*N + r] = jv[r] ^ mseed[c];
    if (pc_pi != e) bad_pi++;
    if (in_seed > 0 && $countones(pc_pi ^ prev_pi) != MC) bad_sic++;
    prev_pi = pc_pi;
    n_pat++;
    in_seed = (in_seed + 1) % (2 * N);
  end

  // ---- mechanism counters (internal strobes, observed only)
  int m_init = 0, m_seed = 0, m_jstep = 0, m_circ = 0, m_cap = 0, m_flush = 0;
  int m_load = 0, m_down = 0, m_phase = 0, m_apply = 0;
  logic ss_phase_q = 1'b0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_pc.u_ctrl.state == ST_INIT || dut.u_ps.u_ctrl.state == ST_INIT) m_init++;
    if (dut.u_pc.clk1_en || dut.u_ps.clk1_en || dut.u_ss.clk1_en) m_seed++;
    if ((dut.u_pc.clk2_en && !dut.u_pc.rj_mode) || (dut.u_ps.clk2_en && !dut.u_ps.rj_mode)) m_jstep++;
    if (dut.u_ps.u_ctrl.state == ST_SHIFT) m_circ++;
    if (ps_capture || ss_capture) m_cap++;
    if (dut.u_ps.u_ctrl.state == ST_FLUSH || dut.u_ss.u_ctrl.state == ST_FLUSH) m_flush++;
    if (dut.u_ss.clk2_en && !ss_se) m_load++;
    if (dut.u_ss.clk2_en && ss_se && dut.u_ss.g_ssc.u_ssc.sub != '0) m_down++;
    if (dut.u_ss.g_ssc.phase != ss_phase_q) m_phase++;
    ss_phase_q = dut.u_ss.g_ssc.phase;
    if (pc_pattern_valid) m_apply++;
  end

  int pc_cyc = 0;
  bit pc_count = 1'b0;
  always @(posedge clk) if (pc_count && !pc_done) pc_cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pc_start = 1'b1; ps_start = 1'b1; ss_start = 1'b1; pc_count = 1'b1;
    @(negedge clk);
    pc_start = 1'b0; ps_start = 1'b0; ss_start = 1'b0;
    wait (pc_done && ps_done && ss_done);
    repeat (3) @(negedge clk);
    chk(pc_cyc + 1 == 2 + (N + 1) + PC_T * (1 + 2 * N), $sformatf("per-clock cycles %0d", pc_cyc + 1));
    // restart of the per-clock generator continues the seed sequence
    pc_start = 1'b1; @(negedge clk); pc_start = 1'b0;
    wait (pc_done);
    repeat (3) @(negedge clk);
    chk(bad_pi == 0, $sformatf("per-clock PI values (%0d wrong)", bad_pi));
    chk(bad_sic == 0, "per-clock single input change per column");
    chk(n_pat == 2 * 2 * N * PC_T, $sformatf("per-clock patterns %0d", n_pat));
    chk(cp0 == 2 * PL * PS_T && cp1 == 2 * SL * SS_T, "per-scan captures");
    chk(sd0 == PS_T && sd1 == SS_T, "per-scan seed changes");
    begin
      logic [7:0] es;
      es = 8'h01;
      for (int n = 0; n < PS_T; n++) es = {es[6:0], es[7] ^ es[5] ^ es[4] ^ es[3]};
      chk(ps_cut_pi == es, "per-scan final seed");
    end
    checks += ck0 + ck1;
    failures += f0 + f1;
    chk(m_init > 0,  $sformatf("mechanism: Johnson counter initialisation (%0d)", m_init));
    chk(m_seed > 0,  $sformatf("mechanism: seed step (%0d)", m_seed));
    chk(m_jstep > 0, $sformatf("mechanism: Johnson step (%0d)", m_jstep));
    chk(m_circ > 0,  $sformatf("mechanism: circular shift (%0d)", m_circ));
    chk(m_cap > 0,   $sformatf("mechanism: capture (%0d)", m_cap));
    chk(m_flush > 0, $sformatf("mechanism: flush (%0d)", m_flush));
    chk(m_load > 0,  $sformatf("mechanism: subtractor load (%0d)", m_load));
    chk(m_down > 0,  $sformatf("mechanism: subtractor count-down (%0d)", m_down));
    chk(m_phase > 0, $sformatf("mechanism: 1s/0s phase change (%0d)", m_phase));
    chk(m_apply > 0, $sformatf("mechanism: per-clock pattern (%0d)", m_apply));
    $display("mechanisms: init=%0d seed=%0d jstep=%0d circ=%0d capture=%0d flush=%0d load=%0d down=%0d phase=%0d apply=%0d",
             m_init, m_seed, m_jstep, m_circ, m_cap, m_flush, m_load, m_down, m_phase, m_apply);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
