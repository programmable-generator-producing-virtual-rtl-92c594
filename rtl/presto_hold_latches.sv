// presto_hold_latches: the n hold latches between PRPG and phase shifter.
//
// Latch i is transparent while en[i] is high (toggle mode): q[i] follows PRPG
// bit d[i]. While en[i] is low (hold mode) q[i] keeps the bit it last passed,
// so the phase shifter sees a constant on that input.
//
// The level-sensitive latch is modelled synchronously: q is a multiplexer
// between d and a register that stores the value q had in the last shift
// cycle. Seen at the shift clock this is exactly the latch behaviour, and the
// design stays a single-clock flip-flop design.
//
// Timing: q is combinational from d, en and the stored value; the store
// updates on rising edges with advance high and resets to 0. The latch
// function follows the published scheme; the synchronous model and the reset
// value are choices of this design.
module presto_hold_latches #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  input  logic [N-1:0] d,
  input  logic [N-1:0] en,
  output logic [N-1:0] q
);

  logic [N-1:0] held;

  assign q = (en & d) | (~en & held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       held <= '0;
    else if (advance) held <= q;
  end

endmodule
