// tb_presto_phase_shifter: self-checking test of the phase shifter.
//
// For random latch words each of the 16 outputs must be the XOR of latches
// 3j, 3j+10 and 3j+22 (mod 32). The three taps must differ, every output must
// toggle when one of its latches toggles, and a word with all tapped latches
// frozen must give a frozen output.
module tb_presto_phase_shifter;
  logic [31:0] q;
  logic [15:0] out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  presto_phase_shifter dut (.q, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      q = $urandom;
      #1;
      for (int j = 0; j < 16; j++) begin
        int a, b, c;
        a = (3 * j) % 32; b = (3 * j + 10) % 32; c = (3 * j + 22) % 32;
        checks++;
        if (a == b || b == c || a == c) begin failures++; $display("FAIL taps of %0d", j); end
        checks++;
        if (out[j] !== (q[a] ^ q[b] ^ q[c])) begin
          failures++;
          $display("FAIL out %0d for %h", j, q);
        end
      end
    end
    // flipping a single latch flips exactly the outputs that use it
    for (int i = 0; i < 32; i++) begin
      logic [15:0] base, flipped, expect_mask;
      q = $urandom; #1; base = out;
      q[i] = ~q[i]; #1; flipped = out;
      expect_mask = '0;
      for (int j = 0; j < 16; j++)
        expect_mask[j] = ((3 * j) % 32 == i) || ((3 * j + 10) % 32 == i) || ((3 * j + 22) % 32 == i);
      checks++;
      if ((base ^ flipped) !== expect_mask) begin failures++; $display("FAIL flip latch %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
