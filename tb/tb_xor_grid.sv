// tb_xor_grid: checks the test-per-clock XOR grid at its default 16 x 16
// size. Input X_{cN+r} must equal J_r xor S_c; a single-bit change of the
// Johnson vector must change exactly MC inputs, all in one row.
module tb_xor_grid;
  localparam int N = 16, MC = 16;
  logic [N-1:0]    jv;
  logic [MC-1:0]   seed;
  logic [N*MC-1:0] x, xp;
  int checks = 0, failures = 0;

  xor_grid dut (.jv, .seed, .x);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    for (int n = 0; n < 300; n++) begin
      jv = $urandom; seed = $urandom;
      if (n == 0) begin jv = '0; seed = '0; end
      if (n == 1) begin jv = '1; seed = 16'h0001; end
      #1;
      bad = 0;
      for (int c = 0; c < MC; c++)
        for (int r = 0; r < N; r++)
          if (x[c*N + r] != (jv[r] ^ seed[c])) bad++;
      chk(bad == 0, $sformatf("grid equation, jv=%h seed=%h", jv, seed));
      // single input change on row r
      begin
        int r, diff, offrow;
        r = $urandom % N;
        xp = x;
        jv[r] = ~jv[r];
        #1;
        diff = $countones(x ^ xp);
        offrow = 0;
        for (int c = 0; c < MC; c++)
          for (int q = 0; q < N; q++)
            if (q != r && x[c*N + q] != xp[c*N + q]) offrow++;
        chk(diff == MC && offrow == 0, "SIC on one row changes one input per column");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
