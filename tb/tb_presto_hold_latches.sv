// tb_presto_hold_latches: self-checking test of the hold latches.
//
// Random PRPG words, enables and shift cycles are applied. Each latch output
// must equal its input while enabled and, while disabled, the value it had
// in the last shift cycle (0 after reset).
module tb_presto_hold_latches;
  logic        clk = 0;
  logic        rst_n, advance;
  logic [31:0] d, en, q;
  logic [31:0] last_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  presto_hold_latches dut (.clk, .rst_n, .advance, .d, .en, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; d = '0; en = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_q = '0;
    for (int t = 0; t < 3000; t++) begin
      advance = ($urandom % 4) != 0;
      d  = $urandom;
      en = $urandom & $urandom;   // about one latch in four enabled
      if (t % 100 < 10) en = '0;   // whole-generator hold
      #1;
      for (int i = 0; i < 32; i++) begin
        logic expect_bit;
        expect_bit = en[i] ? d[i] : last_q[i];
        checks++;
        if (q[i] !== expect_bit) begin
          failures++;
          $display("FAIL cycle %0d latch %0d", t, i);
        end
      end
      @(posedge clk);
      if (advance) last_q = q;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
