// seed_lfsr: seed generator of the MSIC test pattern generator.
//
// An M_SEED-stage Fibonacci LFSR with a primitive feedback polynomial (taken
// from msic_pkg::lfsr_taps). Each CLK1 step shifts the register one place
// towards the high end and feeds the XOR of the tapped stages into bit 0, so
// a non-zero register runs through all 2^M_SEED-1 non-zero states. The seed
// is the register itself: S_i is bit i.
//
// The generator being a conventional LFSR with a primitive polynomial that
// steps once per CLK1 follows the generator description. The Fibonacci form,
// the particular polynomial and the reset value SEED_INIT (any non-zero value)
// are this design's choices.
//
// Interface and timing: CLK1 is realised as the clock enable clk1_en on the
// single system clock; seed changes on the rising clk edge where clk1_en is
// high. rst_n is asynchronous, active low, and loads SEED_INIT.
module seed_lfsr #(
  parameter int unsigned M_SEED = 8,
  parameter logic [M_SEED-1:0] SEED_INIT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk1_en,
  output logic [M_SEED-1:0] seed
);
  import msic_pkg::*;

  localparam logic [31:0] TAPS32 = lfsr_taps(M_SEED);
  localparam logic [M_SEED-1:0] TAPS = TAPS32[M_SEED-1:0];

  logic fb;
  assign fb = ^(seed & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       seed <= SEED_INIT;
    else if (clk1_en) seed <= {seed[M_SEED-2:0], fb};
  end

  initial begin
    assert (M_SEED >= 3 && M_SEED <= 32) else $error("seed_lfsr: M_SEED must be 3..32");
    assert (SEED_INIT != '0) else $error("seed_lfsr: SEED_INIT must be non-zero");
  end
endmodule
