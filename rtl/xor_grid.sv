// xor_grid: SRAM-like XOR grid of the test-per-clock MSIC test pattern generator.
//
// The CUT's N*MC primary inputs are laid out as N rows by MC columns. Row r
// is driven by Johnson output J_r, column c by seed bit S_c, and the grid
// cell at (r, c) is a two-input XOR driving primary input x[c*N + r]
// (X_{cN+r+1} in 1-based naming: X1 = J1^S1, X2 = J2^S1, X_{n+1} = J1^S2).
// Since the Johnson counter changes one bit per step, each step changes
// exactly one row, i.e. MC of the N*MC inputs: every column of N inputs
// receives its own single-input-change sequence.
//
// The grid shape, the XOR per cell and the numbering of the inputs follow the
// test-per-clock generator. The design is combinational.
module xor_grid #(
  parameter int unsigned N  = 16,  // rows = Johnson counter length
  parameter int unsigned MC = 16   // columns = seed width
) (
  input  logic [N-1:0]    jv,
  input  logic [MC-1:0]   seed,
  output logic [N*MC-1:0] x
);
  always_comb begin
    for (int c = 0; c < MC; c++)
      for (int r = 0; r < N; r++)
        x[c*N + r] = jv[r] ^ seed[c];
  end
endmodule
