// msic_bist_scan: test-per-scan BIST built around the MSIC test pattern generator.
//
// Architecture: a seed circuit (seed_lfsr, M_SEED >= M stages) drives the
// CUT's primary inputs directly and, through M XOR gates (xor_network), the
// inputs of M scan chains (scan_chains, L cells each). The other XOR input
// of chain i comes from the SIC generator, selected by GEN:
//   GEN_RJC  reconfigurable Johnson counter (rj_counter) of L stages. Per
//            Johnson vector it makes one Johnson step, then shifts circularly
//            L times, so chain i is filled with the code word seen at stage i
//            XOR S_i. Suits short scan chains.
//   GEN_SSC  scalable SIC counter (ssic_counter): a counter pair generates
//            the code word serially into an M-bit shift register whose stage
//            i feeds chain i. Suits chains much longer than M.
// Either way each chain receives a code word with at most two transitions,
// and the CUT's PIs (the seed) stay constant during the 2L*(L+2) cycles of
// one seed's scans. The clock and control circuit (tpg_ctrl, test-per-scan
// scheme) sequences seed step, Johnson step, L shift cycles and one capture
// cycle, 2L times per seed, for test_len seeds, then flushes the last
// response. A MISR (misr) compacts the scan-chain outputs while shifting and
// the CUT's primary outputs at capture.
//
// The generator, XOR network, scan chains and MISR and their connection
// follow the test-per-scan architecture; the CUT is outside this module and
// is connected through the cut_* ports. The MISR width, the folding of MISR
// inputs (chain i into bit i, PO p into bit (M+p) mod MISR_W), the flush
// phase and the handshake are this design's choices.
//
// Interface and timing: single clock; start/test_len as in tpg_ctrl. cut_pi
// and cut_scan_q are the stimuli; the CUT must present cut_po and cut_next
// combinationally during the capture cycle (capture=1). signature is final
// once done is high.
module msic_bist_scan
  import msic_pkg::*;
#(
  parameter sic_gen_e    GEN    = GEN_RJC,
  parameter int unsigned L      = 8,
  parameter int unsigned M      = 4,
  parameter int unsigned M_SEED = 8,
  parameter int unsigned N_PO   = 8,
  parameter int unsigned MISR_W = 16,
  parameter int unsigned LEN_W  = 16,
  parameter logic [M_SEED-1:0] SEED_INIT = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LEN_W-1:0]    test_len,
  output logic                busy,
  output logic                done,
  // circuit under test
  output logic [M_SEED-1:0]   cut_pi,
  output logic [M-1:0][L-1:0] cut_scan_q,
  input  logic [N_PO-1:0]     cut_po,
  input  logic [M-1:0][L-1:0] cut_next,
  // observation
  output logic [M-1:0]        scan_in,
  output logic                se,
  output logic                capture,
  output logic [MISR_W-1:0]   signature
);
  logic clk1_en, clk2_en, init, rj_mode, apply;
  logic [M_SEED-1:0] seed;
  logic [M-1:0]      sic;
  logic [M-1:0]      scan_out;
  logic [MISR_W-1:0] misr_din;
  tpg_state_e state;

  tpg_ctrl #(.SCHEME(SCHEME_PER_SCAN), .L(L), .LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n, .start, .test_len,
    .clk1_en, .clk2_en, .init, .rj_mode, .se, .capture,
    .apply, .busy, .done, .state
  );

  seed_lfsr #(.M_SEED(M_SEED), .SEED_INIT(SEED_INIT)) u_seed (
    .clk, .rst_n, .clk1_en, .seed
  );

  if (GEN == GEN_RJC) begin : g_rjc
    logic [L-1:0] jv;
    rj_counter #(.L(L)) u_rjc (
      .clk, .rst_n, .clk2_en, .rj_mode, .init, .j(jv)
    );
    assign sic = jv[M-1:0];
  end else begin : g_ssc
    logic [$clog2(L)-1:0] count;
    logic                 m_johnson, phase;
    ssic_counter #(.L(L), .M(M)) u_ssc (
      .clk, .rst_n, .clk2_en, .se, .sr(sic), .m_johnson, .count, .phase
    );
  end

  xor_network #(.M(M), .JW(M), .M_SEED(M_SEED)) u_xor (
    .jv(sic), .seed, .scan_in
  );

  scan_chains #(.M(M), .L(L)) u_chains (
    .clk, .rst_n, .se, .shift_en(clk2_en), .capture_en(capture),
    .scan_in, .d(cut_next), .q(cut_scan_q), .scan_out
  );

  always_comb begin
    misr_din = '0;
    if (se)
      for (int i = 0; i < M; i++) misr_din[i % MISR_W] ^= scan_out[i];
    if (capture)
      for (int p = 0; p < N_PO; p++) misr_din[(M + p) % MISR_W] ^= cut_po[p];
  end

  misr #(.W(MISR_W)) u_misr (
    .clk, .rst_n, .clr(start && !busy), .en((se && clk2_en) || capture),
    .din(misr_din), .sig(signature)
  );

  assign cut_pi = seed;

  initial begin
    assert (M_SEED >= M) else $error("msic_bist_scan: seed width must not be smaller than M");
    assert (L >= M) else $error("msic_bist_scan: need L >= M");
  end
endmodule
