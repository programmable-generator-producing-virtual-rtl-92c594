// tb_presto_duty_ctrl: self-checking test of the hold/toggle period
// controller.
//
// Patterns of 40 shift cycles (restart in the last one) are run with random
// Hold and Toggle lengths, changed only at pattern ends, and random idle
// cycles between shift cycles. For each pattern the expected phase of every
// shift cycle is built up front: toggle for max(T,1) cycles, hold for H
// cycles, repeated; always toggle if H = 0. The flip-flop output must follow
// it and must not move in idle cycles.
module tb_presto_duty_ctrl;
  logic       clk = 0;
  logic       rst_n, shift, restart;
  logic [3:0] hold_len, toggle_len;
  logic       toggle_phase;
  int checks = 0, failures = 0, hold_cycles = 0, toggle_cycles = 0;
  localparam int P = 40;

  always #5 clk = ~clk;

  presto_duty_ctrl dut (.clk, .rst_n, .shift, .restart, .hold_len, .toggle_len, .toggle_phase);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expected [P];
    shift = 0; restart = 0; hold_len = 0; toggle_len = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first pattern after reset: lengths 0 -> always toggle
    for (int pat = 0; pat < 300; pat++) begin
      int pos;
      pos = 0;
      // build the expected phase sequence for this pattern
      while (pos < P) begin
        int tl;
        tl = (toggle_len == 0) ? 1 : int'(toggle_len);
        for (int i = 0; i < tl && pos < P; i++) expected[pos++] = 1'b1;
        if (hold_len == 0) begin
          while (pos < P) expected[pos++] = 1'b1;
        end else begin
          for (int i = 0; i < int'(hold_len) && pos < P; i++) expected[pos++] = 1'b0;
        end
      end
      for (int c = 0; c < P; c++) begin
        // idle cycles must not change anything
        while (($urandom % 4) == 0) begin
          shift = 0; restart = 0;
          @(negedge clk);
          checks++;
          if (toggle_phase !== expected[c]) begin
            failures++;
            $display("FAIL idle pattern %0d cycle %0d", pat, c);
          end
        end
        shift = 1;
        restart = (c == P - 1);
        #1;
        checks++;
        if (toggle_phase !== expected[c]) begin
          failures++;
          $display("FAIL pattern %0d cycle %0d H=%0d T=%0d phase %0b expected %0b",
                   pat, c, hold_len, toggle_len, toggle_phase, expected[c]);
        end
        if (toggle_phase) toggle_cycles++; else hold_cycles++;
        @(posedge clk);
        if (c == P - 1) begin
          hold_len   = 4'($urandom);
          toggle_len = 4'($urandom);
          if ($urandom % 8 == 0) hold_len = 0;
        end
        @(negedge clk);
      end
    end
    shift = 0;
    checks++;
    if (hold_cycles == 0 || toggle_cycles == 0) begin
      failures++;
      $display("FAIL no hold or no toggle cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
