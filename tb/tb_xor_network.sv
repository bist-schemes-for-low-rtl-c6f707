// tb_xor_network: checks the test-per-scan XOR network (M = 4 chains,
// 8-bit Johnson vector, 8-bit seed): scan_in[i] = J_i xor S_i for random
// and corner inputs.
module tb_xor_network;
  localparam int M = 4, JW = 8, MS = 8;
  logic [JW-1:0] jv;
  logic [MS-1:0] seed;
  logic [M-1:0]  scan_in;
  int checks = 0, failures = 0;

  xor_network #(.M(M), .JW(JW), .M_SEED(MS)) dut (.jv, .seed, .scan_in);

  initial begin
    for (int n = 0; n < 600; n++) begin
      if (n < 256) begin jv = n[7:0]; seed = ~n[7:0]; end
      else begin jv = $urandom; seed = $urandom; end
      #1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (scan_in[i] !== (jv[i] != seed[i])) begin
          failures++;
          $display("FAIL: chain %0d jv=%b seed=%b got %b", i, jv, seed, scan_in);
        end
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
