// tb_rj_counter: checks the reconfigurable Johnson counter (L = 8).
// Normal mode: 2L steps from zero give the 2L Johnson vectors (k ones
// entering from the bottom, then k zeros), each a single-input change,
// all distinct, back to the start. Circular mode: L steps return the vector
// and stage i walks through the rotations. Init mode: L+1 steps clear any
// state. Finally random mode sequences are compared with a reference model.
module tb_rj_counter;
  localparam int L = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, rj_mode = 1'b0, init = 1'b1;
  logic [L-1:0] j;
  int checks = 0, failures = 0;

  rj_counter #(.L(L)) dut (.clk, .rst_n, .clk2_en(en), .rj_mode, .init, .j);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (j=%b)", what, j); end
  endtask

  // Johnson vector after k steps from zero (k = 0..2L-1)
  function automatic logic [L-1:0] jvec(input int k);
    logic [L-1:0] v;
    for (int b = 0; b < L; b++) v[b] = (k <= L) ? (b < k) : (b >= k - L);
    return v;
  endfunction

  task automatic step(input logic m, input logic i);
    rj_mode = m; init = i; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    logic [L-1:0] prev, ref_v, start_v;
    logic [L-1:0] seenv [$];
    int ones;
    repeat (2) @(negedge clk);
    chk(j == '0, "reset to zero");
    rst_n = 1'b1;
    @(negedge clk);
    // Normal Johnson mode
    for (int k = 1; k <= 2 * L; k++) begin
      prev = j;
      step(1'b0, 1'b1);
      chk(j == jvec(k % (2 * L)), $sformatf("Johnson vector %0d", k));
      chk($countones(j ^ prev) == 1, "single input change");
      foreach (seenv[q]) if (seenv[q] == j) chk(1'b0, "repeated Johnson vector");
      seenv.push_back(j);
    end
    chk(seenv.size() == 2 * L, "2L unique vectors");
    // Circular shift mode from each Johnson vector
    for (int k = 1; k < 2 * L; k += 3) begin
      while (j != jvec(k)) step(1'b0, 1'b1);
      start_v = j;
      for (int t = 0; t < L; t++) begin
        for (int i = 0; i < L; i++)
          if (j[i] != start_v[(i - t + L) % L]) chk(1'b0, "circular codeword bit");
        step(1'b1, 1'b1);
      end
      chk(j == start_v, "vector restored after L circular shifts");
    end
    // Init mode clears
    while ($countones(j) < 3) step(1'b0, 1'b1);
    for (int t = 0; t < L + 1; t++) step(1'b1, 1'b0);
    chk(j == '0, "init clears the counter");
    // enable low holds
    step(1'b0, 1'b1); prev = j;
    rj_mode = 1'b0; repeat (3) @(negedge clk);
    chk(j == prev, "hold without clk2");
    // random sequences against a reference
    ref_v = j;
    for (int n = 0; n < 500; n++) begin
      logic m, i, e;
      m = $urandom; i = $urandom; e = ($urandom % 4) != 0;
      rj_mode = m; init = i; en = e;
      @(negedge clk);
      if (e) ref_v = {ref_v[L-2:0], m ? (i & ref_v[L-1]) : ~ref_v[L-1]};
      chk(j == ref_v, "random mode sequence");
    end
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
