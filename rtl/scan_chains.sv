// scan_chains: M scan chains of L scan cells each, as seen by the BIST.
//
// In a full-scan design the scan cells belong to the circuit under test; this
// module models them so the test-per-scan generator can be simulated end to
// end. When SE=1 and CLK2 ticks (shift_en), every chain shifts one place:
// scan_in[i] enters cell 0 of chain i and cell L-1 leaves on scan_out[i].
// When SE=0 and capture_en is high, all cells load the CUT's next-state
// values d in parallel. q drives the CUT's pseudo-primary inputs.
//
// The M chains of length L between the XOR network and the MISR follow the
// test-per-scan architecture; the cell numbering, the capture strobe and the
// reset to zero are this design's choices.
module scan_chains #(
  parameter int unsigned M = 4,
  parameter int unsigned L = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                se,
  input  logic                shift_en,
  input  logic                capture_en,
  input  logic [M-1:0]        scan_in,
  input  logic [M-1:0][L-1:0] d,
  output logic [M-1:0][L-1:0] q,
  output logic [M-1:0]        scan_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (se) begin
      if (shift_en)
        for (int i = 0; i < M; i++) q[i] <= {q[i][L-2:0], scan_in[i]};
    end else if (capture_en) begin
      q <= d;
    end
  end

  always_comb
    for (int i = 0; i < M; i++) scan_out[i] = q[i][L-1];
endmodule
