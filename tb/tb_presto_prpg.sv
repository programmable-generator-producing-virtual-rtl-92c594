// tb_presto_prpg: self-checking test of the PRPG.
//
// The 32-stage default generator is compared, cycle by cycle, with a bit
// sequence built from the recurrence a[t] = a[t-10]^a[t-30]^a[t-31]^a[t-32]
// (stage i of the generator must hold a[t-1-i]). The test also checks that
// the state holds without advance, that seed_load loads the seed, and that
// injected channel bits land in stages 0 and 16 of the next state. A second,
// 8-stage instance with feedback a[t] = a[t-2]^a[t-3]^a[t-4]^a[t-8] must run
// through all 255 non-zero states prev repeating.
module tb_presto_prpg;
  logic        clk = 0;
  logic        rst_n;
  logic        advance, seed_load, inj_en;
  logic [31:0] seed;
  logic [1:0]  inj_data;
  logic [31:0] state;
  logic [7:0]  state8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  presto_prpg dut (.clk, .rst_n, .advance, .seed_load, .seed, .inj_en, .inj_data, .state);
  presto_prpg #(.N(8), .TAPS(8'h8E), .SEED(8'h01), .C(2)) dut8 (
    .clk, .rst_n, .advance, .seed_load(1'b0), .seed(8'h00), .inj_en(1'b0), .inj_data(2'b00),
    .state(state8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] ref_step(input logic [31:0] s);
    return {s[30:0], s[9] ^ s[29] ^ s[30] ^ s[31]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seq[$];
    logic [31:0] exp;
    logic [7:0]  first8;
    int          period;
    bit          seen [256];
    advance = 0; seed_load = 0; inj_en = 0; seed = '0; inj_data = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 32'h1, "reset seed");
    // bit history: stage i holds a[t-1-i]; seed 1 means a[t-1] = 1, older bits 0
    for (int i = 31; i >= 0; i--) seq.push_back(state[i]);
    advance = 1;
    for (int t = 0; t < 2000; t++) begin
      int n;
      @(negedge clk);
      n = seq.size();
      seq.push_back(seq[n-10] ^ seq[n-30] ^ seq[n-31] ^ seq[n-32]);
      n = seq.size();
      for (int i = 0; i < 32; i++) exp[i] = seq[n-1-i];
      check(state == exp, $sformatf("sequence step %0d", t));
    end
    // hold without advance
    advance = 0;
    exp = state;
    repeat (5) @(negedge clk);
    check(state == exp, "hold without advance");
    // seed load (priority over advance)
    seed = 32'hDEAD_BEEF; seed_load = 1; advance = 1;
    @(negedge clk);
    seed_load = 0; advance = 0;
    check(state == 32'hDEAD_BEEF, "seed load");
    // injection
    for (int k = 0; k < 50; k++) begin
      logic [31:0] prev;
      prev = state;
      inj_en = 1; advance = 1; inj_data = 2'($urandom);
      @(negedge clk);
      exp = ref_step(prev);
      exp[0]  ^= inj_data[0];
      exp[16] ^= inj_data[1];
      check(state == exp, $sformatf("injection %0d", k));
    end
    // injection disabled: data ignored
    inj_en = 0; inj_data = 2'b11;
    exp = ref_step(state);
    @(negedge clk);
    check(state == exp, "injection disabled");
    advance = 0;
    // maximal period of the 8-stage instance
    rst_n = 0; @(negedge clk); rst_n = 1;
    first8 = state8;
    advance = 1;
    period = 0;
    do begin
      seen[state8] = 1'b1;
      @(negedge clk);
      period++;
    end while (state8 != first8 && period < 300);
    check(period == 255, $sformatf("8-stage period %0d", period));
    begin
      int cnt = 0;
      for (int v = 1; v < 256; v++) cnt += seen[v];
      check(cnt == 255 && !seen[0], "8-stage visits all non-zero states");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
