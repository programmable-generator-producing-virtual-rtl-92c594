// presto_weight_gen: weighted source of the toggle enable bits.
//
// Four AND gates each combine one switching bit with a group of PRPG bits.
// Gate k (k = 0..3) takes k+1 PRPG stages, so when its switching bit is set
// it outputs 1 with probability 2^-(k+1) (1/2, 1/4, 1/8, 1/16). The OR of the
// four gates is the bit shifted into the shift register, so the expected
// fraction of 1s, and with it the fraction of hold latches in toggle mode,
// is 1 - prod(1 - 2^-(k+1)) over the enabled gates. A switching code of 0000
// is flagged on lp_off: the low-power function is then off and every hold
// latch follows the PRPG (except in hold periods).
//
// Purely combinational; enable_bit is sampled by the shift register at the
// end of each shift cycle. The structure (switching register, weighted AND
// gates, OR gate, a gate decoding the switching code) follows the block
// diagram of the published scheme; the probabilities, the PRPG stages used
// (odd stages 1..19, see presto_pkg::wg_stage) and the meaning of code 0000
// are choices of this design.
module presto_weight_gen
  import presto_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [CFG_W-1:0] switching,
  input  logic [N-1:0]     prpg,
  output logic             enable_bit,
  output logic             lp_off
);

  logic [CFG_W-1:0] gate;

  always_comb begin
    for (int unsigned k = 0; k < CFG_W; k++) begin
      gate[k] = switching[k];
      for (int unsigned i = 0; i <= k; i++)
        gate[k] &= prpg[wg_stage(N, k, i)];
    end
    enable_bit = |gate;
    lp_off     = ~|switching;
  end

endmodule
