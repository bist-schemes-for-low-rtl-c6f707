// tb_seed_lfsr: checks the seed generator.
// Two instances (8 and 16 stages) are stepped through a full period with
// random idle cycles in between. Checked: reset value, no change without
// clk1_en, the shift structure (bits move one place up each step), every
// non-zero state visited exactly once and the period 2^w - 1, i.e. the
// feedback polynomial is primitive.
module tb_seed_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  s8;
  logic [15:0] s16;
  int checks = 0, failures = 0;

  seed_lfsr #(.M_SEED(8))  dut8  (.clk, .rst_n, .clk1_en(en), .seed(s8));
  seed_lfsr #(.M_SEED(16), .SEED_INIT(16'hACE1)) dut16 (.clk, .rst_n, .clk1_en(en), .seed(s16));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit seen8[256];
  bit seen16[65536];
  initial begin
    logic [7:0] p8; logic [15:0] p16;
    int period8 = 0, period16 = 0, dup8 = 0, dup16 = 0, shifterr = 0;
    repeat (2) @(posedge clk);
    chk(s8 == 8'h01 && s16 == 16'hACE1, "reset values");
    rst_n = 1'b1;
    @(negedge clk);
    // hold
    p8 = s8; p16 = s16;
    repeat (3) @(negedge clk);
    chk(s8 == p8 && s16 == p16, "no step without clk1_en");
    for (int k = 0; k < 65535; k++) begin
      p8 = s8; p16 = s16;
      if (k < 255) begin
        if (seen8[s8]) dup8++;
        seen8[s8] = 1'b1;
      end
      if (seen16[s16]) dup16++;
      seen16[s16] = 1'b1;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if (s8[7:1] != p8[6:0] || s16[15:1] != p16[14:0]) shifterr++;
      if (period8 == 0 && s8 == 8'h01) period8 = k + 1;
      if (period16 == 0 && s16 == 16'hACE1) period16 = k + 1;
      if (($urandom % 8) == 0) @(negedge clk);
    end
    chk(s8 != 0 && s16 != 0, "never reaches the all-zero state");
    chk(period8 == 255, $sformatf("8-bit period %0d", period8));
    chk(period16 == 65535, $sformatf("16-bit period %0d", period16));
    chk(dup8 == 0 && dup16 == 0, "no repeated state inside a period");
    chk(shifterr == 0, "shift structure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
