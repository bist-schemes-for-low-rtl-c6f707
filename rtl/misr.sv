// misr: multiple-input signature register compacting the test responses.
//
// A W-bit LFSR with a primitive polynomial (msic_pkg::lfsr_taps) whose next
// state is additionally XORed with the W-bit input word: on each clock with
// en high, sig <= {sig[W-2:0], feedback} ^ din. The final value is the test
// signature, compared against a fault-free reference outside the BIST.
//
// A MISR at the CUT's outputs is part of the test-per-scan architecture;
// its width, polynomial, shift form and zero reset are this design's
// choices.
module misr #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,   // synchronous clear to zero
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] sig
);
  import msic_pkg::*;

  localparam logic [31:0] TAPS32 = lfsr_taps(W);
  localparam logic [W-1:0] TAPS = TAPS32[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= {sig[W-2:0], ^(sig & TAPS)} ^ din;
  end

  initial assert (W >= 3 && W <= 32) else $error("misr: W must be 3..32");
endmodule
