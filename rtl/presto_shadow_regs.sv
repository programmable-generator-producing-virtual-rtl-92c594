// presto_shadow_regs: configuration registers with shadow copies.
//
// The switching code and the Hold and Toggle lengths are written (we) into a
// staging copy at any time. The generator reads only the active (shadow)
// copy, which takes the staging values at the end of a pattern (update high
// in the last shift cycle). So a new configuration never changes the
// generator inside a pattern or during the capture cycles that follow it,
// and the next pattern starts with it.
//
// Timing: staging loads on any rising edge with we high; the active copy
// loads on a rising edge with update high, taking the staging value from
// before that edge. Reset clears both: switching 0000 (low power off) and no
// hold periods, a plain pseudorandom generator. Keeping the values steady
// through capture with shadow registers follows the published scheme; the
// parallel write port and reset values are choices of this design.
module presto_shadow_regs
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  presto_cfg_t cfg_in,
  input  logic        update,
  output presto_cfg_t cfg_active
);

  presto_cfg_t staging;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      staging    <= '0;
      cfg_active <= '0;
    end else begin
      if (we)     staging    <= cfg_in;
      if (update) cfg_active <= staging;
    end
  end

endmodule
