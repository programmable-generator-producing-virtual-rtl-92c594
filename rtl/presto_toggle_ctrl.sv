// presto_toggle_ctrl: shift register and toggle control register.
//
// The shift register takes one weighted enable bit per shift cycle (into
// stage 0, moving towards stage N-1). At the end of every pattern (reload
// high in its last shift cycle) the whole shift register is copied into the
// toggle control register, which then stays fixed for the next pattern. A 1
// in toggle control bit i puts hold latch i in toggle mode (it passes PRPG
// bit i); a 0 puts it in hold mode. So the fraction of 1s sets the switching
// activity of the scan chains for a whole pattern.
//
// Timing: both registers change only on rising edges with shift high; the
// reload takes the shift register as it was before that edge. Reset gives a
// toggle control register of all ones (full toggling for the first pattern)
// and an empty shift register; the reset values are this design's choice.
// The two registers and the once-per-pattern reload follow the published
// scheme.
module presto_toggle_ctrl #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         bit_in,
  input  logic         reload,
  output logic [N-1:0] tcr
);

  logic [N-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      tcr  <= '1;
    end else if (shift) begin
      sreg <= {sreg[N-2:0], bit_in};
      if (reload) tcr <= sreg;
    end
  end

endmodule
