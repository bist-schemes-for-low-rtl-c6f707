// xor_network: XOR gate network of the test-per-scan MSIC test pattern generator.
//
// Scan chain i (0-based) receives Johnson output J_i XOR seed bit S_i, so
// while the Johnson counter shifts circularly each chain is fed one Johnson
// code word masked by a constant seed bit: a low-transition, SIC-derived
// vector per chain. The network is combinational.
//
// Which Johnson stage and which seed bit meet at each XOR follows the
// symbolic simulation of one pattern (chain i taps J_i and S_i). Parameter
// names are this design's.
//
// Interface: jv is the SIC generator's vector (at least M bits), seed the
// seed generator's output (at least M bits); scan_in[i] drives chain i.
module xor_network #(
  parameter int unsigned M      = 4,
  parameter int unsigned JW     = 8,
  parameter int unsigned M_SEED = 8
) (
  input  logic [JW-1:0]     jv,
  input  logic [M_SEED-1:0] seed,
  output logic [M-1:0]      scan_in
);
  assign scan_in = jv[M-1:0] ^ seed[M-1:0];

  initial begin
    assert (JW >= M) else $error("xor_network: Johnson vector narrower than chain count");
    assert (M_SEED >= M) else $error("xor_network: seed narrower than chain count");
  end
endmodule
