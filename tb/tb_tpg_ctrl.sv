// tb_tpg_ctrl: checks the clock and control circuit in both schemes (L = 4,
// three seeds). Counted from start to done and compared with the procedure:
//   test-per-clock: L+1 init steps (RJ_Mode=1, Init=0), then per seed one
//     CLK1 and 2L Johnson steps (RJ_Mode=0); 2L*T apply strobes. Counting
//     the start cycle and the first done cycle, 2 + (L+1) + T(1+2L) cycles.
//   test-per-scan: L+1 init steps, per seed one CLK1 and 2L times
//     (Johnson step, L shifts with RJ_Mode=Init=SE=1, one capture), then L
//     flush shifts; 2 + (L+1) + T(1 + 2L(L+2)) + L cycles.
// Also: CLK1 and CLK2 never together, no SE during a Johnson step, done held
// until the next start, test_len = 0 finishing at once, and a restart.
module tb_tpg_ctrl;
  import msic_pkg::*;
  localparam int L = 4, T = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] test_len;
  int checks = 0, failures = 0;

  logic c1[2], c2[2], ini[2], rjm[2], se[2], cap[2], app[2], busy[2], done[2];
  tpg_state_e st[2];

  tpg_ctrl #(.SCHEME(SCHEME_PER_CLOCK), .L(L)) dut_pc (
    .clk, .rst_n, .start, .test_len, .clk1_en(c1[0]), .clk2_en(c2[0]), .init(ini[0]),
    .rj_mode(rjm[0]), .se(se[0]), .capture(cap[0]), .apply(app[0]), .busy(busy[0]),
    .done(done[0]), .state(st[0]));
  tpg_ctrl #(.SCHEME(SCHEME_PER_SCAN), .L(L)) dut_ps (
    .clk, .rst_n, .start, .test_len, .clk1_en(c1[1]), .clk2_en(c2[1]), .init(ini[1]),
    .rj_mode(rjm[1]), .se(se[1]), .capture(cap[1]), .apply(app[1]), .busy(busy[1]),
    .done(done[1]), .state(st[1]));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc[2], n_c1[2], n_init[2], n_jstep[2], n_shift[2], n_cap[2], n_app[2], n_both[2], n_sej[2];
  int n_run_init[2], run[2], max_run_shift[2];
  bit seen_done[2];

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (!seen_done[d]) begin
      cyc[d]++;
      if (c1[d]) n_c1[d]++;
      if (c2[d] && rjm[d] && !ini[d]) n_init[d]++;
      if (c2[d] && !rjm[d]) n_jstep[d]++;
      if (c2[d] && se[d]) begin run[d]++; n_shift[d]++; end
      else begin if (run[d] > max_run_shift[d]) max_run_shift[d] = run[d]; run[d] = 0; end
      if (cap[d]) n_cap[d]++;
      if (app[d]) n_app[d]++;
      if (c1[d] && c2[d]) n_both[d]++;
      if (se[d] && !rjm[d]) n_sej[d]++;
      if (done[d] && !start) seen_done[d] = 1'b1;
    end
  end

  task automatic run_test(input int tl);
    test_len = 16'(tl);
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      cyc[d] = 0; n_c1[d] = 0; n_init[d] = 0; n_jstep[d] = 0; n_shift[d] = 0; n_cap[d] = 0;
      n_app[d] = 0; n_both[d] = 0; n_sej[d] = 0; run[d] = 0; max_run_shift[d] = 0; seen_done[d] = 0;
    end
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (seen_done[0] && seen_done[1]);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy[0] && !busy[1] && !done[0] && !done[1] && !c1[0] && !c2[1], "idle after reset");
    for (int rep = 0; rep < 2; rep++) begin
      run_test(T);
      // test-per-clock
      chk(cyc[0] == 2 + (L + 1) + T * (1 + 2 * L), $sformatf("per-clock cycles %0d", cyc[0]));
      chk(n_c1[0] == T, "per-clock CLK1 count");
      chk(n_init[0] == L + 1, "per-clock init steps > L");
      chk(n_jstep[0] == 2 * L * T, "per-clock Johnson steps");
      chk(n_app[0] == 2 * L * T, $sformatf("per-clock patterns %0d", n_app[0]));
      chk(n_shift[0] == 0, "per-clock has no scan shifting");
      // test-per-scan
      chk(cyc[1] == 2 + (L + 1) + T * (1 + 2 * L * (L + 2)) + L,
          $sformatf("per-scan cycles %0d", cyc[1]));
      chk(n_c1[1] == T, "per-scan CLK1 count");
      chk(n_init[1] == L + 1, "per-scan init steps > L");
      chk(n_jstep[1] == 2 * L * T, "per-scan Johnson steps");
      chk(n_cap[1] == 2 * L * T && n_app[1] == 2 * L * T, "per-scan captures");
      chk(n_shift[1] == 2 * L * T * L + L, "per-scan shift cycles");
      chk(max_run_shift[1] == L, "shift bursts of L cycles");
      chk(n_both[0] == 0 && n_both[1] == 0, "CLK1 and CLK2 never together");
      chk(n_sej[1] == 0, "no SE during a Johnson step");
      repeat (5) @(negedge clk);
      chk(done[0] && done[1] && !busy[0] && !busy[1], "done held");
    end
    run_test(0);
    chk(cyc[0] == 2 && cyc[1] == 2 && n_c1[0] == 0 && n_c1[1] == 0, "test_len 0 ends at once");
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
