// presto_duty_ctrl: hold/toggle period controller.
//
// A T flip-flop (phase) moves the whole generator back and forth between
// toggle periods (phase = 1: hold latches follow the toggle control
// register) and hold periods (phase = 0: every hold latch is disabled and
// all phase shifter inputs are frozen). A period ends when a 1 reaches the T
// input. That happens when the shift cycles spent in the current period
// reach the length held in the Toggle or Hold register:
//   toggle period: max(toggle_len, 1) shift cycles,
//   hold period:   hold_len shift cycles.
// hold_len = 0 means no hold periods at all (the T input never fires in a
// toggle period), which gives the plain PRESTO behaviour. Each pattern starts
// with a toggle period and a cleared cycle count, so every pattern gets the
// same sequence of periods.
//
// Timing: all state changes on rising edges with shift high. toggle_phase is
// the flip-flop output and is valid for the current shift cycle. restart is
// high in the last shift cycle of a pattern. The lengths are read every
// cycle, so they must be steady during a pattern (the shadow registers see
// to that). The T flip-flop and the 4-bit Hold and Toggle registers follow
// the published scheme; reading the register values as lengths counted by a
// cycle counter, and the meaning of 0, are choices of this design.
module presto_duty_ctrl
  import presto_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             restart,
  input  logic [CFG_W-1:0] hold_len,
  input  logic [CFG_W-1:0] toggle_len,
  output logic             toggle_phase
);

  logic [CFG_W-1:0] elapsed;   // shift cycles already spent in this period
  logic [CFG_W:0]   done;      // cycles spent including the current one
  logic             t_in;      // T flip-flop input

  always_comb begin
    done = {1'b0, elapsed} + 1'b1;
    if (toggle_phase) t_in = (hold_len != '0) && (done >= {1'b0, toggle_len});
    else              t_in = (done >= {1'b0, hold_len});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toggle_phase <= 1'b1;
      elapsed      <= '0;
    end else if (shift) begin
      if (restart) begin
        toggle_phase <= 1'b1;
        elapsed      <= '0;
      end else if (t_in) begin
        toggle_phase <= ~toggle_phase;
        elapsed      <= '0;
      end else if (elapsed != '1) begin
        elapsed <= elapsed + 1'b1;
      end
    end
  end

endmodule
