// tpg_ctrl: clock and control circuit of the MSIC test pattern generator.
//
// A Moore state machine on the system clock that produces the two test
// clocks as clock enables (clk1_en = CLK1 for the seed generator, clk2_en =
// CLK2 for the SIC generator and the scan chains) and the mode lines Init,
// RJ_Mode and SE, stepping through the test procedure:
//
//   INIT     L+1 cycles, RJ_Mode=1 Init=0, CLK2 running: clears the Johnson
//            counter (it must be clocked more than L times).
//   SEED     one CLK1 step: a new seed.
//   test-per-clock (SCHEME_PER_CLOCK):
//     JSTEP  RJ_Mode=0, one CLK2 step per cycle, 2L cycles: 2L Johnson
//            vectors, one pattern each; then SEED again.
//   test-per-scan (SCHEME_PER_SCAN):
//     JSTEP   RJ_Mode=0, one CLK2 step: a new Johnson vector;
//     SHIFT   RJ_Mode=1 Init=1 SE=1, L CLK2 steps: the counter shifts
//             circularly and L code words enter the scan chains;
//     CAPTURE SE=0, capture=1: the scan cells capture the CUT response.
//             After 2L vectors go to SEED, or, after the last seed, to
//     FLUSH   SE=1, L CLK2 steps to shift the last response out.
//   DONE     done=1 until start is raised again.
// test_len is the number of seeds (test length = test_len * 2L patterns);
// test_len = 0 ends the test at once.
//
// The order of CLK1, CLK2, Init and RJ_Mode events, the L-step circular
// shift and the 2L vectors per seed follow the two test procedures. Using
// clock enables instead of separate clocks, the INIT length of L+1, the
// CAPTURE and FLUSH states, the start/done handshake and the apply strobe
// are this design's choices.
//
// apply is high for one cycle whenever a new complete pattern sits at the
// CUT: the cycle after each JSTEP step in test-per-clock mode, the CAPTURE
// cycle in test-per-scan mode.
module tpg_ctrl
  import msic_pkg::*;
#(
  parameter tpg_scheme_e SCHEME = SCHEME_PER_SCAN,
  parameter int unsigned L      = 8,
  parameter int unsigned LEN_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] test_len,
  output logic             clk1_en,
  output logic             clk2_en,
  output logic             init,
  output logic             rj_mode,
  output logic             se,
  output logic             capture,
  output logic             apply,
  output logic             busy,
  output logic             done,
  output tpg_state_e       state
);
  localparam int unsigned CW = $clog2(2 * L + 1);

  tpg_state_e       state_d;
  logic [CW-1:0]    cyc, cyc_d;       // cycles within INIT / SHIFT / FLUSH
  logic [CW-1:0]    vec, vec_d;       // Johnson vectors of the current seed
  logic [LEN_W-1:0] nseed, nseed_d;   // seeds completed
  logic             apply_q;

  logic last_vec, last_seed;
  assign last_vec  = (vec == CW'(2 * L - 1));
  assign last_seed = (nseed == test_len - 1'b1);

  always_comb begin
    state_d = state;
    cyc_d   = cyc;
    vec_d   = vec;
    nseed_d = nseed;
    unique case (state)
      ST_IDLE, ST_DONE: begin
        if (start) begin
          cyc_d   = '0;
          vec_d   = '0;
          nseed_d = '0;
          state_d = (test_len == '0) ? ST_DONE : ST_INIT;
        end
      end
      ST_INIT: begin
        cyc_d = cyc + 1'b1;
        if (cyc == CW'(L)) state_d = ST_SEED;
      end
      ST_SEED: begin
        vec_d   = '0;
        state_d = ST_JSTEP;
      end
      ST_JSTEP: begin
        if (SCHEME == SCHEME_PER_CLOCK) begin
          vec_d = vec + 1'b1;
          if (last_vec) begin
            nseed_d = nseed + 1'b1;
            state_d = last_seed ? ST_DONE : ST_SEED;
          end
        end else begin
          cyc_d   = '0;
          state_d = ST_SHIFT;
        end
      end
      ST_SHIFT: begin
        cyc_d = cyc + 1'b1;
        if (cyc == CW'(L - 1)) state_d = ST_CAPTURE;
      end
      ST_CAPTURE: begin
        cyc_d = '0;
        if (last_vec) begin
          nseed_d = nseed + 1'b1;
          state_d = last_seed ? ST_FLUSH : ST_SEED;
        end else begin
          vec_d   = vec + 1'b1;
          state_d = ST_JSTEP;
        end
      end
      ST_FLUSH: begin
        cyc_d = cyc + 1'b1;
        if (cyc == CW'(L - 1)) state_d = ST_DONE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cyc     <= '0;
      vec     <= '0;
      nseed   <= '0;
      apply_q <= 1'b0;
    end else begin
      state   <= state_d;
      cyc     <= cyc_d;
      vec     <= vec_d;
      nseed   <= nseed_d;
      apply_q <= (SCHEME == SCHEME_PER_CLOCK) && (state == ST_JSTEP);
    end
  end

  assign clk1_en = (state == ST_SEED);
  assign clk2_en = (state == ST_INIT) || (state == ST_JSTEP) ||
                   (state == ST_SHIFT) || (state == ST_FLUSH);
  assign rj_mode = (state != ST_JSTEP);
  assign init    = (state != ST_INIT);
  assign se      = (state == ST_SHIFT) || (state == ST_FLUSH);
  assign capture = (state == ST_CAPTURE);
  assign apply   = (SCHEME == SCHEME_PER_CLOCK) ? apply_q : capture;
  assign busy    = (state != ST_IDLE) && (state != ST_DONE);
  assign done    = (state == ST_DONE);

  // A seed step never coincides with a Johnson step or a scan shift.
  a_clk_excl: assert property (@(posedge clk) disable iff (!rst_n) !(clk1_en && clk2_en));
  // Johnson mode is only used outside scan shifting.
  a_mode_se: assert property (@(posedge clk) disable iff (!rst_n) se |-> rj_mode && init);
endmodule
