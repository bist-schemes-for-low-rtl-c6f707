// msic_tpg_clock: MSIC test pattern generator for test-per-clock BIST.
//
// A new pattern reaches the CUT's N*MC primary inputs on every clock. The
// PIs form an N x MC grid of XOR gates (xor_grid): row r sees Johnson output
// J_r, column c seed bit S_c. The seed generator (seed_lfsr, MC stages)
// steps once per CLK1; between seed steps the reconfigurable Johnson counter
// (rj_counter, N stages) makes 2N single-input-change steps on CLK2. Each
// step changes one grid row, so each column of N inputs gets its own SIC
// sequence and the mean input transition density is 1/N. The clock and
// control circuit (tpg_ctrl, test-per-clock scheme) first clears the Johnson
// counter, then repeats "new seed, 2N Johnson steps" test_len times.
//
// Structure and procedure follow the test-per-clock generator. Grid size
// (16 x 16 = 256 inputs, enough for the ISCAS'85 circuits of the power
// experiments), seed reset value and the start/done handshake are this
// design's choices.
//
// Interface and timing: pulse start (with test_len = number of seeds) while
// idle or done; pi changes after each Johnson step and pattern_valid is high
// in the cycle a fresh pattern is present. done rises after test_len*2N
// patterns.
module msic_tpg_clock
  import msic_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned MC    = 16,
  parameter int unsigned LEN_W = 16,
  parameter logic [MC-1:0] SEED_INIT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] test_len,
  output logic [N*MC-1:0]  pi,
  output logic             pattern_valid,
  output logic             busy,
  output logic             done,
  output logic [N-1:0]     johnson,   // observation: J vector
  output logic [MC-1:0]    seed       // observation: S vector
);
  logic clk1_en, clk2_en, init, rj_mode, se, capture;
  tpg_state_e state;

  tpg_ctrl #(.SCHEME(SCHEME_PER_CLOCK), .L(N), .LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n, .start, .test_len,
    .clk1_en, .clk2_en, .init, .rj_mode, .se, .capture,
    .apply(pattern_valid), .busy, .done, .state
  );

  seed_lfsr #(.M_SEED(MC), .SEED_INIT(SEED_INIT)) u_seed (
    .clk, .rst_n, .clk1_en, .seed
  );

  rj_counter #(.L(N)) u_rjc (
    .clk, .rst_n, .clk2_en, .rj_mode, .init, .j(johnson)
  );

  xor_grid #(.N(N), .MC(MC)) u_grid (
    .jv(johnson), .seed, .x(pi)
  );
endmodule
