// tb_presto_toggle_ctrl: self-checking test of the shift register and the
// toggle control register.
//
// Random enable bits, shift cycles and pattern-end reloads are applied. A
// reference keeps the last 32 shifted bits; after every reload the toggle
// control register must equal them (newest bit in stage 0) and otherwise it
// must not change. It must be all ones after reset.
module tb_presto_toggle_ctrl;
  logic        clk = 0;
  logic        rst_n, shift, bit_in, reload;
  logic [31:0] tcr;
  logic [31:0] model_sreg, model_tcr;
  int checks = 0, failures = 0, reloads = 0;

  always #5 clk = ~clk;

  presto_toggle_ctrl dut (.clk, .rst_n, .shift, .bit_in, .reload, .tcr);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; bit_in = 0; reload = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (tcr !== 32'hFFFF_FFFF) begin failures++; $display("FAIL reset value"); end
    model_sreg = '0;
    model_tcr  = '1;
    for (int t = 0; t < 3000; t++) begin
      shift  = ($urandom % 4) != 0;
      bit_in = $urandom;
      reload = ($urandom % 40) == 0;
      @(posedge clk);
      if (shift) begin
        if (reload) begin
          model_tcr = model_sreg;
          reloads++;
        end
        // a shift register that keeps a history of the last 32 bits
        for (int i = 31; i > 0; i--) model_sreg[i] = model_sreg[i-1];
        model_sreg[0] = bit_in;
      end
      @(negedge clk);
      checks++;
      if (tcr !== model_tcr) begin
        failures++;
        $display("FAIL cycle %0d tcr %h expected %h", t, tcr, model_tcr);
      end
    end
    checks++;
    if (reloads < 10) begin failures++; $display("FAIL too few reloads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
