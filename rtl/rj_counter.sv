// rj_counter: reconfigurable Johnson counter (SIC generator for short scan chains).
//
// L D flip-flops D1..DL in a shift chain clocked by CLK2. The value entering
// D1 is chosen by RJ_Mode:
//   RJ_Mode=0            normal Johnson mode: D1 takes the complement of DL,
//                        so 2L steps run through 2L single-input-change vectors;
//   RJ_Mode=1, Init=1    circular shift mode: D1 takes DL, so after L steps
//                        every stage has emitted one Johnson codeword and the
//                        vector is back where it started;
//   RJ_Mode=1, Init=0    initialisation: D1 takes 0, so more than L steps
//                        clear the counter.
// j[i] is the output of stage D(i+1), i.e. J_{i+1} in 1-based naming or J_i
// in the 0-based naming of the pattern equations.
//
// The three modes and the gating of the feedback by Init follow the
// generator description. Realising CLK2 as the clock enable clk2_en and the
// asynchronous active-low reset to all zeros are this design's choices.
module rj_counter #(
  parameter int unsigned L = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clk2_en,
  input  logic         rj_mode,
  input  logic         init,
  output logic [L-1:0] j
);
  logic d_in;
  assign d_in = rj_mode ? (init & j[L-1]) : ~j[L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       j <= '0;
    else if (clk2_en) j <= {j[L-2:0], d_in};
  end

  initial assert (L >= 2) else $error("rj_counter: L must be at least 2");
endmodule
