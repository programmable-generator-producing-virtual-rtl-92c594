// tb_presto_pattern_counter: self-checking test of the pattern counter.
//
// With random gaps between shift cycles, count must step only on shift
// cycles, last must be high exactly on every 64th shift cycle, and count
// must wrap to 0 after it. A 5-cycle instance is checked the same way.
module tb_presto_pattern_counter;
  logic       clk = 0;
  logic       rst_n, shift;
  logic [5:0] count;
  logic       last;
  logic [2:0] count5;
  logic       last5;
  int checks = 0, failures = 0;
  int shifts = 0, patterns = 0;

  always #5 clk = ~clk;

  presto_pattern_counter dut (.clk, .rst_n, .shift, .count, .last);
  presto_pattern_counter #(.L(5)) dut5 (.clk, .rst_n, .shift, .count(count5), .last(last5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      shift = ($urandom % 3) != 0;
      #1;
      check(count == 6'(shifts % 64), $sformatf("count %0d at shift %0d", count, shifts));
      check(last == ((shifts % 64) == 63), "last");
      check(count5 == 3'(shifts % 5), "count5");
      check(last5 == ((shifts % 5) == 4), "last5");
      if (shift && last) patterns++;
      @(negedge clk);
      if (shift) shifts++;
    end
    check(patterns >= 30, "enough patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
