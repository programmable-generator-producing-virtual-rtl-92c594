// tb_presto_weight_gen: self-checking test of the weighted enable source.
//
// For every switching code the output is compared with a reference written
// out stage by stage (gate 0: stage 1; gate 1: stages 3, 5; gate 2: stages
// 7, 9, 11; gate 3: stages 13, 15, 17, 19) over random PRPG words. The
// fraction of 1s over 4000 random words must also lie within 0.03 of
// 1 - prod(1 - 2^-(k+1)) over the enabled gates, and lp_off must be high for
// code 0000 only.
module tb_presto_weight_gen;
  logic [3:0]  switching;
  logic [31:0] prpg;
  logic        enable_bit, lp_off;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  presto_weight_gen dut (.switching, .prpg, .enable_bit, .lp_off);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic ref_bit(input logic [3:0] sw, input logic [31:0] p);
    logic g0, g1, g2, g3;
    g0 = sw[0] & p[1];
    g1 = sw[1] & p[3] & p[5];
    g2 = sw[2] & p[7] & p[9] & p[11];
    g3 = sw[3] & p[13] & p[15] & p[17] & p[19];
    return g0 | g1 | g2 | g3;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 16; code++) begin
      int ones;
      real expect_p, q, got;
      ones = 0;
      switching = 4'(code);
      q = 1.0;
      for (int k = 0; k < 4; k++)
        if (code[k]) q = q * (1.0 - 1.0 / real'(2 ** (k + 1)));
      expect_p = 1.0 - q;
      for (int n = 0; n < 4000; n++) begin
        prpg = $urandom;
        #1;
        if (enable_bit !== ref_bit(switching, prpg)) begin
          checks++; failures++;
          $display("FAIL code %b prpg %h", switching, prpg);
        end
        ones += int'(enable_bit);
      end
      checks++;
      got = real'(ones) / 4000.0;
      if (got < expect_p - 0.03 || got > expect_p + 0.03) begin
        failures++;
        $display("FAIL code %b fraction %f expected %f", switching, got, expect_p);
      end
      check(lp_off == (code == 0), $sformatf("lp_off for code %b", switching));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
