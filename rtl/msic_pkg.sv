// msic_pkg: types and constants shared by the MSIC test pattern generator.
//
// lfsr_taps(w) returns the feedback mask of a maximal-length (primitive
// polynomial) Fibonacci LFSR of width w, 3..32. Bit i-1 of the mask set
// means stage i is tapped. The polynomials are the usual maximal-length
// tables; the generator only requires "a primitive polynomial", which
// polynomial is used is this design's choice. Widths outside 3..32 fall
// back to the x^w + x^(w-1) + 1 trinomial, which is not always primitive.
//
// tpg_state_e names the states of the clock and control circuit (tpg_ctrl),
// tpg_scheme_e selects test-per-clock or test-per-scan sequencing and
// sic_gen_e selects which SIC generator a test-per-scan BIST uses.
package msic_pkg;

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start
    ST_INIT    = 3'd1,  // RJ_Mode=1, Init=0: clear the Johnson counter
    ST_SEED    = 3'd2,  // CLK1 pulse: new seed
    ST_JSTEP   = 3'd3,  // RJ_Mode=0: one Johnson step
    ST_SHIFT   = 3'd4,  // RJ_Mode=1, Init=1, SE=1: circular shift / scan-in
    ST_CAPTURE = 3'd5,  // SE=0: scan cells capture the CUT response
    ST_FLUSH   = 3'd6,  // SE=1: shift the last response out
    ST_DONE    = 3'd7
  } tpg_state_e;

  typedef enum logic {
    SCHEME_PER_CLOCK = 1'b0,
    SCHEME_PER_SCAN  = 1'b1
  } tpg_scheme_e;

  typedef enum logic {
    GEN_RJC = 1'b0,  // reconfigurable Johnson counter
    GEN_SSC = 1'b1   // scalable SIC counter
  } sic_gen_e;

  function automatic logic [31:0] lfsr_taps(input int unsigned w);
    logic [31:0] t;
    t = '0;
    case (w)
      3:  t = (32'h1 << 2)  | (32'h1 << 1);
      4:  t = (32'h1 << 3)  | (32'h1 << 2);
      5:  t = (32'h1 << 4)  | (32'h1 << 2);
      6:  t = (32'h1 << 5)  | (32'h1 << 4);
      7:  t = (32'h1 << 6)  | (32'h1 << 5);
      8:  t = (32'h1 << 7)  | (32'h1 << 5) | (32'h1 << 4) | (32'h1 << 3);
      9:  t = (32'h1 << 8)  | (32'h1 << 4);
      10: t = (32'h1 << 9)  | (32'h1 << 6);
      11: t = (32'h1 << 10) | (32'h1 << 8);
      12: t = (32'h1 << 11) | (32'h1 << 5) | (32'h1 << 3) | (32'h1 << 0);
      13: t = (32'h1 << 12) | (32'h1 << 3) | (32'h1 << 2) | (32'h1 << 0);
      14: t = (32'h1 << 13) | (32'h1 << 4) | (32'h1 << 2) | (32'h1 << 0);
      15: t = (32'h1 << 14) | (32'h1 << 13);
      16: t = (32'h1 << 15) | (32'h1 << 14) | (32'h1 << 12) | (32'h1 << 3);
      17: t = (32'h1 << 16) | (32'h1 << 13);
      18: t = (32'h1 << 17) | (32'h1 << 10);
      19: t = (32'h1 << 18) | (32'h1 << 5) | (32'h1 << 1) | (32'h1 << 0);
      20: t = (32'h1 << 19) | (32'h1 << 16);
      21: t = (32'h1 << 20) | (32'h1 << 18);
      22: t = (32'h1 << 21) | (32'h1 << 20);
      23: t = (32'h1 << 22) | (32'h1 << 17);
      24: t = (32'h1 << 23) | (32'h1 << 22) | (32'h1 << 21) | (32'h1 << 16);
      25: t = (32'h1 << 24) | (32'h1 << 21);
      26: t = (32'h1 << 25) | (32'h1 << 5) | (32'h1 << 1) | (32'h1 << 0);
      27: t = (32'h1 << 26) | (32'h1 << 4) | (32'h1 << 1) | (32'h1 << 0);
      28: t = (32'h1 << 27) | (32'h1 << 24);
      29: t = (32'h1 << 28) | (32'h1 << 26);
      30: t = (32'h1 << 29) | (32'h1 << 5) | (32'h1 << 3) | (32'h1 << 0);
      31: t = (32'h1 << 30) | (32'h1 << 27);
      32: t = (32'h1 << 31) | (32'h1 << 21) | (32'h1 << 1) | (32'h1 << 0);
      default: t = (32'h1 << (w - 1)) | (32'h1 << (w - 2));
    endcase
    return t;
  endfunction

endpackage
