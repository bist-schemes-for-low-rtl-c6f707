// msic_bist_top: the MSIC low-power BIST pattern generators side by side.
//
// The MSIC generator comes in two schemes that serve different circuits, so
// the top holds one of each, plus the test-per-scan BIST with the second SIC
// generator, each with its own start/test_len/done and its own CUT ports:
//   pc_*   test-per-clock generator (msic_tpg_clock): 16 x 16 XOR grid, a
//          new pattern on the 256 primary inputs every clock;
//   ps_*   test-per-scan BIST (msic_bist_scan) with the reconfigurable
//          Johnson counter: 4 scan chains of 8 cells, 8-bit seed;
//   ss_*   test-per-scan BIST with the scalable SIC counter: 4 chains of
//          32 cells, the case of chains much longer than their number.
// The circuits under test are external: each BIST brings out its stimuli
// (PIs, scan-cell values) and takes back the CUT responses (POs, next-state
// values); the seed, Johnson vector, scan inputs and SE of each are
// brought out for observation. All three share clk and the asynchronous active-low rst_n.
//
// The two schemes and two generators are the ones of the MSIC design; the
// sizes are this design's choices except the 8-bit seed, 8-bit scan vectors
// and four chains of the per-scan/Johnson instance, which match the sizes
// used to demonstrate that generator.
module msic_bist_top #(
  parameter int unsigned PC_N      = 16,
  parameter int unsigned PC_MC     = 16,
  parameter int unsigned PS_L      = 8,
  parameter int unsigned PS_M      = 4,
  parameter int unsigned PS_M_SEED = 8,
  parameter int unsigned SS_L      = 32,
  parameter int unsigned SS_M      = 4,
  parameter int unsigned SS_M_SEED = 8,
  parameter int unsigned N_PO      = 8,
  parameter int unsigned MISR_W    = 16,
  parameter int unsigned LEN_W     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // test-per-clock generator
  input  logic                      pc_start,
  input  logic [LEN_W-1:0]          pc_test_len,
  output logic [PC_N*PC_MC-1:0]     pc_pi,
  output logic                      pc_pattern_valid,
  output logic                      pc_busy,
  output logic                      pc_done,
  output logic [PC_N-1:0]           pc_johnson,
  output logic [PC_MC-1:0]          pc_seed,
  // test-per-scan BIST, reconfigurable Johnson counter
  input  logic                      ps_start,
  input  logic [LEN_W-1:0]          ps_test_len,
  output logic [PS_M_SEED-1:0]      ps_cut_pi,
  output logic [PS_M-1:0][PS_L-1:0] ps_cut_scan_q,
  input  logic [N_PO-1:0]           ps_cut_po,
  input  logic [PS_M-1:0][PS_L-1:0] ps_cut_next,
  output logic                      ps_capture,
  output logic [MISR_W-1:0]         ps_signature,
  output logic                      ps_busy,
  output logic                      ps_done,
  output logic [PS_M-1:0]           ps_scan_in,
  output logic                      ps_se,
  // test-per-scan BIST, scalable SIC counter
  input  logic                      ss_start,
  input  logic [LEN_W-1:0]          ss_test_len,
  output logic [SS_M_SEED-1:0]      ss_cut_pi,
  output logic [SS_M-1:0][SS_L-1:0] ss_cut_scan_q,
  input  logic [N_PO-1:0]           ss_cut_po,
  input  logic [SS_M-1:0][SS_L-1:0] ss_cut_next,
  output logic                      ss_capture,
  output logic [MISR_W-1:0]         ss_signature,
  output logic                      ss_busy,
  output logic                      ss_done,
  output logic [SS_M-1:0]           ss_scan_in,
  output logic                      ss_se
);
  import msic_pkg::*;

  msic_tpg_clock #(.N(PC_N), .MC(PC_MC), .LEN_W(LEN_W)) u_pc (
    .clk, .rst_n, .start(pc_start), .test_len(pc_test_len),
    .pi(pc_pi), .pattern_valid(pc_pattern_valid), .busy(pc_busy), .done(pc_done),
    .johnson(pc_johnson), .seed(pc_seed)
  );

  msic_bist_scan #(.GEN(GEN_RJC), .L(PS_L), .M(PS_M), .M_SEED(PS_M_SEED),
                   .N_PO(N_PO), .MISR_W(MISR_W), .LEN_W(LEN_W)) u_ps (
    .clk, .rst_n, .start(ps_start), .test_len(ps_test_len),
    .busy(ps_busy), .done(ps_done),
    .cut_pi(ps_cut_pi), .cut_scan_q(ps_cut_scan_q), .cut_po(ps_cut_po),
    .cut_next(ps_cut_next), .scan_in(ps_scan_in), .se(ps_se),
    .capture(ps_capture), .signature(ps_signature)
  );

  msic_bist_scan #(.GEN(GEN_SSC), .L(SS_L), .M(SS_M), .M_SEED(SS_M_SEED),
                   .N_PO(N_PO), .MISR_W(MISR_W), .LEN_W(LEN_W)) u_ss (
    .clk, .rst_n, .start(ss_start), .test_len(ss_test_len),
    .busy(ss_busy), .done(ss_done),
    .cut_pi(ss_cut_pi), .cut_scan_q(ss_cut_scan_q), .cut_po(ss_cut_po),
    .cut_next(ss_cut_next), .scan_in(ss_scan_in), .se(ss_se),
    .capture(ss_capture), .signature(ss_signature)
  );
endmodule
