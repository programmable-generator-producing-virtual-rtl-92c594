// presto_prpg: the pseudorandom pattern generator (PRPG) at the heart of the
// PRESTO generator.
//
// A Fibonacci linear feedback shift register of N stages. Stage 0 takes the
// new bit and stage i holds the bit produced i+1 steps ago, so the feedback
// bit is the XOR of the stages selected by TAPS. The default TAPS gives the
// recurrence a[t] = a[t-10] ^ a[t-30] ^ a[t-31] ^ a[t-32], a maximal-length
// sequence (the reciprocal of x^32+x^22+x^2+x+1).
//
// Beyond free-running, the state can be reseeded (seed_load) and tester data
// can be injected: with inj_en high, channel c is XORed into stage c*N/C of
// the next state. Together with the phase shifter this lets the generator
// act as a test data decompressor, as in combined BIST and test compression
// flows.
//
// Interface and timing: the state moves one step on every rising clock edge
// with advance high (a shift cycle); seed_load takes priority over stepping
// and needs no advance. Reset loads SEED. The published scheme allows an LFSR
// or a ring generator of n bits; the LFSR, its size, taps, seed and the
// injection points are choices of this design.
module presto_prpg #(
  parameter int unsigned N    = 32,
  parameter logic [N-1:0] TAPS = 32'hE000_0200,
  parameter logic [N-1:0] SEED = 32'h0000_0001,
  parameter int unsigned C    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  input  logic         seed_load,
  input  logic [N-1:0] seed,
  input  logic         inj_en,
  input  logic [C-1:0] inj_data,
  output logic [N-1:0] state
);

  logic [N-1:0] stepped;
  logic [N-1:0] injection;

  always_comb begin
    stepped = {state[N-2:0], ^(state & TAPS)};
    injection = '0;
    for (int unsigned c = 0; c < C; c++)
      injection[(c * N) / C] = inj_en & inj_data[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= SEED;
    else if (seed_load) state <= seed;
    else if (advance)   state <= stepped ^ injection;
  end

endmodule
