// presto_pattern_counter: counts the shift cycles of one test pattern.
//
// count runs 0..L-1 over the L shift cycles that load the scan chains; last
// is high during the final one. The pattern end reloads the toggle control
// register, restarts the hold/toggle sequence and lets new configuration
// values take effect. Capture cycles (shift low) are not counted.
//
// Timing: count steps on rising edges with shift high and wraps from L-1 to 0;
// last is combinational from count. The published scheme names a pattern
// counter that drives the toggle control register; the pattern length L
// (the scan chain length) is a choice of this design.
module presto_pattern_counter #(
  parameter int unsigned L = 64,
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  output logic [CW-1:0] count,
  output logic          last
);

  assign last = (count == CW'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (shift) count <= last ? '0 : count + 1'b1;
  end

endmodule
