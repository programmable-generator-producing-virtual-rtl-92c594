// tb_presto_toggling: switching activity of the scan chain inputs.
//
// The full-size generator is run for 202 patterns per setting. The first two
// are discarded: a new configuration reaches the generator one pattern
// after it is written, and the toggle control register it fills is used in
// the pattern after that. Over the remaining patterns the fraction of shift
// cycles on which a scan chain input changes value is measured. A chain
// input is the XOR of three latches, each changing with probability 1/2
// when in toggle mode, so the expected rate is
//   0.5 * (1 - (1 - p)^3) * T / (T + H)
// where p is the probability that a latch is in toggle mode (1 for code
// 0000, 1 - prod(1 - 2^-(k+1)) otherwise) and T/(T+H) the fraction of shift
// cycles in toggle periods (1 without hold periods). Each measured rate must
// be within 0.03 of that value, and the rates of the single-gate codes must
// fall with the weight.
module tb_presto_toggling;
  import presto_pkg::*;

  logic         clk = 0;
  logic         rst_n, shift_en, cfg_we;
  presto_cfg_t  cfg_in, cfg_active;
  logic [31:0]  latch_en;
  logic [15:0]  scan_in;
  logic [5:0]   shift_count;
  logic         pattern_end, toggle_phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  presto_top dut (.clk, .rst_n, .shift_en, .cfg_we, .cfg_in, .seed_load(1'b0), .seed(32'h0),
                  .inj_en(1'b0), .inj_data(2'b00), .scan_in, .shift_count, .pattern_end,
                  .toggle_phase, .latch_en, .cfg_active);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected_rate(input presto_cfg_t c);
    real p, q, duty;
    if (c.switching == 0) p = 1.0;
    else begin
      q = 1.0;
      for (int k = 0; k < 4; k++) if (c.switching[k]) q = q * (1.0 - 1.0 / real'(2 ** (k + 1)));
      p = 1.0 - q;
    end
    if (c.hold_len == 0) duty = 1.0;
    else duty = real'(c.toggle_len) / real'(int'(c.toggle_len) + int'(c.hold_len));
    return 0.5 * (1.0 - (1.0 - p) ** 3) * duty;
  endfunction

  task automatic measure(input presto_cfg_t c, output real rate);
    logic [15:0] prev;
    int changes, samples;
    cfg_in = c; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    changes = 0; samples = 0;
    shift_en = 1;
    for (int pat = 0; pat < 202; pat++) begin
      for (int s = 0; s < 64; s++) begin
        if (pat >= 2 && s > 0) begin
          changes += $countones(scan_in ^ prev);
          samples += 16;
        end
        prev = scan_in;
        @(negedge clk);
      end
    end
    rate = real'(changes) / real'(samples);
  endtask

  initial begin
    presto_cfg_t cfgs [8];
    real rates [8];
    shift_en = 0; cfg_we = 0; cfg_in = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfgs[0] = '{switching: 4'b0000, hold_len: 4'd0,  toggle_len: 4'd0};
    cfgs[1] = '{switching: 4'b0001, hold_len: 4'd0,  toggle_len: 4'd0};
    cfgs[2] = '{switching: 4'b0010, hold_len: 4'd0,  toggle_len: 4'd0};
    cfgs[3] = '{switching: 4'b0100, hold_len: 4'd0,  toggle_len: 4'd0};
    cfgs[4] = '{switching: 4'b1000, hold_len: 4'd0,  toggle_len: 4'd0};
    cfgs[5] = '{switching: 4'b0000, hold_len: 4'd4,  toggle_len: 4'd4};
    cfgs[6] = '{switching: 4'b0000, hold_len: 4'd12, toggle_len: 4'd4};
    cfgs[7] = '{switching: 4'b0011, hold_len: 4'd4,  toggle_len: 4'd4};
    for (int i = 0; i < 8; i++) begin
      real e;
      measure(cfgs[i], rates[i]);
      e = expected_rate(cfgs[i]);
      $display("switching %b hold %0d toggle %0d: chain toggle rate %f expected %f",
               cfgs[i].switching, cfgs[i].hold_len, cfgs[i].toggle_len, rates[i], e);
      checks++;
      if (rates[i] < e - 0.03 || rates[i] > e + 0.03) begin
        failures++;
        $display("FAIL rate for setting %0d", i);
      end
    end
    for (int i = 1; i < 5; i++) begin
      checks++;
      if (!(rates[i] < rates[i-1])) begin
        failures++;
        $display("FAIL rate does not fall from setting %0d to %0d", i - 1, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
