// presto_top: PRESTO low-power programmable pseudorandom test pattern
// generator with hold and toggle periods.
//
// An N-bit PRPG drives M scan chains through N hold latches and a phase
// shifter (each chain input is the XOR of three latches). The number of
// latches in toggle mode, and so the switching activity of the scan chains,
// is set per pattern by the toggle control register: a shift register is
// filled, one bit per shift cycle, with bits that are 1 with a probability
// chosen by the 4-bit switching code, and is copied into the toggle control
// register at the end of each pattern (pattern counter). On top of that a T
// flip-flop splits each pattern into alternating toggle and hold periods of
// programmable length (4-bit Toggle and Hold registers); in a hold period
// every latch is disabled and all scan chains receive constants. The
// switching, Hold and Toggle values sit behind shadow registers so they
// change only between patterns. Reseeding and tester-data injection into the
// PRPG let the same hardware decompress deterministic patterns.
//
// Latch enable i = (tcr[i] | lp_off) & toggle_phase, where lp_off means
// switching code 0000 (low power off).
//
// Interface and timing: one shift cycle per clock with shift_en high;
// scan_in is valid during that cycle and is taken by the scan chains on its
// rising edge, when the PRPG also steps. shift_count gives the index of
// the current shift cycle within the pattern. Cycles with shift_en low (capture,
// idle) freeze the generator. pattern_end marks the last of the L shift
// cycles of a pattern; a configuration written with cfg_we applies from the
// next pattern. The architecture follows the published scheme; sizes, tap
// positions, weights, the hold/toggle length encoding and reset values are
// choices of this design, listed in each block. Two assertions check that
// the active configuration changes only at a pattern end and that a hold
// period disables every latch; they read rst_n synchronously only to switch
// themselves off during reset.
module presto_top
  import presto_pkg::*;
#(
  parameter int unsigned  N    = 32,
  parameter int unsigned  M    = 16,
  parameter int unsigned  L    = 64,
  parameter int unsigned  C    = 2,
  parameter logic [N-1:0] TAPS = 32'hE000_0200,
  parameter logic [N-1:0] SEED = 32'h0000_0001,
  localparam int unsigned CW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         cfg_we,
  input  presto_cfg_t  cfg_in,
  input  logic         seed_load,
  input  logic [N-1:0] seed,
  input  logic         inj_en,
  input  logic [C-1:0] inj_data,
  output logic [M-1:0] scan_in,
  output logic [CW-1:0] shift_count,
  output logic         pattern_end,
  output logic         toggle_phase,
  output logic [N-1:0] latch_en,
  output presto_cfg_t  cfg_active
);

  logic [N-1:0]  prpg_state;
  logic [N-1:0]  tcr;
  logic [N-1:0]  latch_q;
  logic          enable_bit;
  logic          lp_off;

  presto_prpg #(.N(N), .TAPS(TAPS), .SEED(SEED), .C(C)) u_prpg (
    .clk, .rst_n, .advance(shift_en), .seed_load, .seed, .inj_en, .inj_data,
    .state(prpg_state)
  );

  presto_shadow_regs u_shadow (
    .clk, .rst_n, .we(cfg_we), .cfg_in, .update(shift_en & pattern_end),
    .cfg_active
  );

  presto_pattern_counter #(.L(L)) u_pcnt (
    .clk, .rst_n, .shift(shift_en), .count(shift_count), .last(pattern_end)
  );

  presto_weight_gen #(.N(N)) u_wgen (
    .switching(cfg_active.switching), .prpg(prpg_state), .enable_bit, .lp_off
  );

  presto_toggle_ctrl #(.N(N)) u_tctrl (
    .clk, .rst_n, .shift(shift_en), .bit_in(enable_bit), .reload(pattern_end),
    .tcr
  );

  presto_duty_ctrl u_duty (
    .clk, .rst_n, .shift(shift_en), .restart(pattern_end),
    .hold_len(cfg_active.hold_len), .toggle_len(cfg_active.toggle_len),
    .toggle_phase
  );

  assign latch_en = (tcr | {N{lp_off}}) & {N{toggle_phase}};

  presto_hold_latches #(.N(N)) u_latches (
    .clk, .rst_n, .advance(shift_en), .d(prpg_state), .en(latch_en), .q(latch_q)
  );

  presto_phase_shifter #(.N(N), .M(M)) u_ps (
    .q(latch_q), .out(scan_in)
  );

  // The configuration in use changes only at the edge that ends a pattern.
  a_cfg_steady: assert property (@(posedge clk) disable iff (!rst_n)
    !$past(shift_en & pattern_end) |-> $stable(cfg_active));

  // A hold period disables every hold latch.
  a_hold_freezes: assert property (@(posedge clk) disable iff (!rst_n)
    !toggle_phase |-> (latch_en == '0));

endmodule
