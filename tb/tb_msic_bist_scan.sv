// tb_msic_bist_scan: runs the test-per-scan MSIC BIST end to end with both
// SIC generators: the Johnson-counter version at its default size (4 chains
// of 8 cells, 8-bit seed) and the scalable-SIC-counter version with 4
// chains of 16 cells, each for two seeds, against a made-up CUT. The
// reference model (msic_scan_checker) predicts every scan-in bit, the chain
// contents at every capture and the final MISR signature. Also checked: the
// cycle count from start to done, 2 + (L+1) + T(1 + 2L(L+2)) + L, the
// number of captures (2L per seed), seed changes and flush shifts.
module tb_msic_bist_scan;
  import msic_pkg::*;
  localparam int T = 2;
  localparam int L0 = 8, M0 = 4, L1 = 16, M1 = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] test_len = 16'(T);
  int checks = 0, failures = 0;

  logic busy0, done0, se0, cap0, busy1, done1, se1, cap1;
  logic [7:0] pi0, pi1;
  logic [M0-1:0][L0-1:0] q0, nx0;
  logic [M1-1:0][L1-1:0] q1, nx1;
  logic [7:0] po0, po1;
  logic [M0-1:0] si0;
  logic [M1-1:0] si1;
  logic [15:0] sig0, sig1;
  int ck0, f0, sh0, cp0, sd0, fl0, ck1, f1, sh1, cp1, sd1, fl1;

  msic_bist_scan dut0 (
    .clk, .rst_n, .start, .test_len, .busy(busy0), .done(done0),
    .cut_pi(pi0), .cut_scan_q(q0), .cut_po(po0), .cut_next(nx0),
    .scan_in(si0), .se(se0), .capture(cap0), .signature(sig0));
  msic_scan_checker #(.GEN(0), .L(L0), .M(M0), .T(T)) chk0 (
    .clk, .rst_n, .cut_pi(pi0), .cut_scan_q(q0), .scan_in(si0), .se(se0), .capture(cap0),
    .done(done0), .signature(sig0), .cut_po(po0), .cut_next(nx0),
    .checks(ck0), .failures(f0), .n_shift(sh0), .n_capture(cp0), .n_seed(sd0), .n_flush(fl0));

  msic_bist_scan #(.GEN(GEN_SSC), .L(L1), .M(M1)) dut1 (
    .clk, .rst_n, .start, .test_len, .busy(busy1), .done(done1),
    .cut_pi(pi1), .cut_scan_q(q1), .cut_po(po1), .cut_next(nx1),
    .scan_in(si1), .se(se1), .capture(cap1), .signature(sig1));
  msic_scan_checker #(.GEN(1), .L(L1), .M(M1), .T(T)) chk1 (
    .clk, .rst_n, .cut_pi(pi1), .cut_scan_q(q1), .scan_in(si1), .se(se1), .capture(cap1),
    .done(done1), .signature(sig1), .cut_po(po1), .cut_next(nx1),
    .checks(ck1), .failures(f1), .n_shift(sh1), .n_capture(cp1), .n_seed(sd1), .n_flush(fl1));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc0 = 0, cyc1 = 0;
  bit counting = 1'b0;
  always @(posedge clk) if (counting) begin
    if (!done0) cyc0++;
    if (!done1) cyc1++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; counting = 1'b1; @(negedge clk); start = 1'b0;
    wait (done0 && done1);
    repeat (3) @(negedge clk);
    chk(cyc0 + 1 == 2 + (L0 + 1) + T * (1 + 2 * L0 * (L0 + 2)) + L0, $sformatf("RJC cycles %0d", cyc0 + 1));
    chk(cyc1 + 1 == 2 + (L1 + 1) + T * (1 + 2 * L1 * (L1 + 2)) + L1, $sformatf("SSC cycles %0d", cyc1 + 1));
    chk(cp0 == 2 * L0 * T && cp1 == 2 * L1 * T, "captures: 2L per seed");
    chk(sh0 == 2 * L0 * T * L0 && sh1 == 2 * L1 * T * L1, "scan-in shift cycles");
    chk(fl0 == L0 && fl1 == L1, "flush shifts");
    chk(sd0 == T && sd1 == T, $sformatf("seed changes %0d %0d", sd0, sd1));
    checks += ck0 + ck1;
    failures += f0 + f1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
