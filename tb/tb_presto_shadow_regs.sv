// tb_presto_shadow_regs: self-checking test of the configuration shadow
// registers.
//
// Random writes and pattern-end updates are applied. The active copy must
// be all zeros after reset, must change only in cycles with update high, and
// must then take the value last written before that edge.
module tb_presto_shadow_regs;
  import presto_pkg::*;
  logic        clk = 0;
  logic        rst_n, we, update;
  presto_cfg_t cfg_in, cfg_active;
  presto_cfg_t model_stage, model_active;
  int checks = 0, failures = 0, updates = 0, changes = 0;

  always #5 clk = ~clk;

  presto_shadow_regs dut (.clk, .rst_n, .we, .cfg_in, .update, .cfg_active);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; update = 0; cfg_in = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (cfg_active !== '0) begin failures++; $display("FAIL reset value"); end
    model_stage = '0;
    model_active = '0;
    for (int t = 0; t < 3000; t++) begin
      presto_cfg_t prev;
      prev = cfg_active;
      we = ($urandom % 3) == 0;
      cfg_in = presto_cfg_t'($urandom);
      update = ($urandom % 10) == 0;
      @(posedge clk);
      if (update) begin
        model_active = model_stage;
        updates++;
      end
      if (we) model_stage = cfg_in;
      @(negedge clk);
      checks++;
      if (cfg_active !== model_active) begin
        failures++;
        $display("FAIL cycle %0d active %h expected %h", t, cfg_active, model_active);
      end
      if (cfg_active != prev) changes++;
    end
    checks++;
    if (updates < 100 || changes < 50) begin failures++; $display("FAIL too few updates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
