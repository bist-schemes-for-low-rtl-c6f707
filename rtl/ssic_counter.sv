// ssic_counter: scalable SIC counter (SIC generator for long scan chains).
//
// Used when the scan length L is much larger than the number of scan chains
// M. Instead of an L-stage Johnson counter it holds:
//   - a K-bit adder (cnt) plus a phase bit (pol), stepped once per scan on
//     the falling edge of SE. cnt is the number of 1s (phase 0) or 0s
//     (phase 1) to feed in during the next scan; it counts 0..L-1 and the
//     phase flips when it wraps, giving 2L distinct scans;
//   - a K-bit subtractor (sub) clocked by CLK2. Through K multiplexers
//     selected by SE it loads cnt while SE=0 and counts down to zero while
//     SE=1;
//   - the serial bit M_Johnson = 1 (0 in phase 1) while SE=1 and sub is not
//     zero, else 0 (1 in phase 1);
//   - an M-bit shift register clocked by CLK2 during SE=1 that M_Johnson
//     enters; stage i drives scan chain i.
// Over one scan of L CLK2 cycles M_Johnson is therefore cnt copies of one
// value followed by L-cnt copies of the other: a Johnson code word with at
// most one transition. Each chain sees it delayed by a different amount.
//
// Adder, subtractor, multiplexers and shift register follow the block
// description. Its sentences disagree on which SE edge steps the adder
// (rising in one sentence, falling in the next); the falling edge is used.
// K defaults to clog2(L), wide enough for a count of L-1; the sizing rule
// k = int(log2(l-M)) given with the block cannot hold that count and is not
// used. The count range 0..L-1, the phase bit and the reset values (all zero)
// are this design's choices.
//
// Timing: everything runs on clk. SE's falling edge is detected against a
// registered copy of se; the adder updates at the end of the first SE=0
// cycle, so SE must stay low for at least one cycle with clk2_en high after
// that for the subtractor to load the new count. CLK2 is the clock enable
// clk2_en.
module ssic_counter #(
  parameter int unsigned L = 32,
  parameter int unsigned M = 4,
  parameter int unsigned K = (L > 2) ? $clog2(L) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clk2_en,
  input  logic         se,
  output logic [M-1:0] sr,         // M-bit shift register, bit i feeds chain i
  output logic         m_johnson,  // serial code word bit
  output logic [K-1:0] count,      // adder value: 1s (0s) of the next scan
  output logic         phase       // 0: cnt 1s then 0s, 1: cnt 0s then 1s
);
  logic         se_q;
  logic         se_fall;
  logic [K-1:0] cnt, sub, sub_d;

  assign se_fall = se_q & ~se;

  // K-bit adder stepped by the falling SE edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      se_q  <= 1'b0;
      cnt   <= '0;
      phase <= 1'b0;
    end else begin
      se_q <= se;
      if (se_fall) begin
        if (cnt == K'(L - 1)) begin
          cnt   <= '0;
          phase <= ~phase;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // K multiplexers: load the adder's count while SE=0, count down while SE=1.
  always_comb begin
    if (!se)            sub_d = cnt;
    else if (sub != '0) sub_d = sub - 1'b1;
    else                sub_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sub <= '0;
    else if (clk2_en) sub <= sub_d;
  end

  assign m_johnson = (se && sub != '0) ? ~phase : phase;

  // M-bit shift register clocked by CLK2 during scan shifting.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              sr <= '0;
    else if (clk2_en && se)  sr <= (sr << 1) | M'(m_johnson);
  end

  assign count = cnt;

  initial begin
    assert (L >= 2 && M >= 1) else $error("ssic_counter: need L >= 2, M >= 1");
    assert ((L - 1) < (1 << K)) else $error("ssic_counter: K too small for L");
  end
endmodule
