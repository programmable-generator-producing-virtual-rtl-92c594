// presto_phase_shifter: XOR network from the hold latches to the scan chains.
//
// Each of the M outputs is the XOR of three different hold latch outputs:
// output j uses latches 3j, 3j+N/3 and 3j+2N/3+1, all modulo N (see
// presto_pkg::ps_tap). If all three latches of an output are in hold mode,
// that scan chain receives a constant and does not toggle.
//
// Purely combinational. Three inputs per output follow the published scheme;
// the tap positions are a choice of this design.
module presto_phase_shifter
  import presto_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 16
) (
  input  logic [N-1:0] q,
  output logic [M-1:0] out
);

  always_comb begin
    for (int unsigned j = 0; j < M; j++)
      out[j] = q[ps_tap(N, j, 0)] ^ q[ps_tap(N, j, 1)] ^ q[ps_tap(N, j, 2)];
  end

endmodule
