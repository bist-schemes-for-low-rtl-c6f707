// tb_misr: checks the 16-bit MISR. Reference: x^16 + x^15 + x^13 + x^4 + 1,
// the signature shifting towards the high end with the feedback (XOR of
// stages 16, 15, 13 and 4) entering stage 1, then XORed with the input.
// Random input streams with random enables and a clear are compared cycle by
// cycle; with zero input from a non-zero state the register must have period
// 2^16 - 1; a one-bit error in a 500-word stream must change the signature.
module tb_misr;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] din, sig;
  int checks = 0, failures = 0;

  misr #(.W(W)) dut (.clk, .rst_n, .clr, .en, .din, .sig);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] nxt(input logic [W-1:0] s, input logic [W-1:0] x);
    logic fb;
    fb = s[15] ^ s[14] ^ s[12] ^ s[3];
    return {s[14:0], fb} ^ x;
  endfunction

  initial begin
    logic [W-1:0] r, golden;
    logic [W-1:0] words[500];
    int bad, period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(sig == '0, "reset");
    r = '0; bad = 0;
    for (int n = 0; n < 1000; n++) begin
      en = ($urandom % 3) != 0; din = $urandom; clr = (n == 400);
      @(negedge clk);
      if (clr) r = '0; else if (en) r = nxt(r, din);
      chk(sig == r, $sformatf("signature matches reference at word %0d", n));
    end
    // period with zero input
    clr = 1'b0; en = 1'b1; din = 16'h0001; @(negedge clk); din = '0;
    r = sig; period = 0;
    for (int n = 1; n <= 65535; n++) begin
      @(negedge clk);
      if (period == 0 && sig == r) period = n;
    end
    chk(period == 65535, $sformatf("autonomous period %0d", period));
    // aliasing check on a single-bit error
    for (int n = 0; n < 500; n++) words[n] = $urandom;
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int n = 0; n < 500; n++) begin
        din = words[n];
        if (pass == 1 && n == 137) din[5] = ~din[5];
        @(negedge clk);
      end
      if (pass == 0) golden = sig;
      else chk(sig != golden, "one-bit error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
