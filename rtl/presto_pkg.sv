// presto_pkg: types and helper functions shared by the PRESTO low-power
// pattern generator.
//
// presto_cfg_t is the programmable part of the generator: the 4-bit
// switching code that sets the fraction of hold latches in toggle mode, and
// the 4-bit Hold and Toggle lengths that split every pattern into hold and
// toggle periods. The field widths of Hold and Toggle (4 bits) follow the
// published scheme; the 4-bit switching code follows its block diagram, which
// shows four switching bits feeding four weighted gates.
//
// ps_tap() gives the three hold latches that feed a phase shifter output and
// wg_stage() the PRPG stages used by the weighted gates. Both tap rules are
// choices of this design; the published scheme only says that each phase
// shifter output is the XOR of three different hold latches.
package presto_pkg;

  localparam int unsigned CFG_W = 4;

  typedef struct packed {
    logic [CFG_W-1:0] switching;  // bit k enables weighted gate k; 0000 = low power off
    logic [CFG_W-1:0] hold_len;   // hold period length in shift cycles, 0 = no hold periods
    logic [CFG_W-1:0] toggle_len; // toggle period length in shift cycles, 0 = no toggle periods
  } presto_cfg_t;

  // Stage of an N-stage register feeding tap t (0..2) of phase shifter
  // output j. The offsets 0, N/3 and 2N/3+1 keep the three taps different for
  // any N >= 4.
  function automatic int unsigned ps_tap(int unsigned n, int unsigned j, int unsigned t);
    int unsigned off;
    case (t)
      0:       off = 0;
      1:       off = n / 3;
      default: off = (2 * n) / 3 + 1;
    endcase
    return (3 * j + off) % n;
  endfunction

  // PRPG stage for input i (0..k) of weighted gate k. Gate k uses k+1 stages;
  // the ten stages of the four gates are distinct odd stages 1, 3, ..., 19,
  // wrapped modulo N for small generators.
  function automatic int unsigned wg_stage(int unsigned n, int unsigned k, int unsigned i);
    int unsigned base;
    base = (k * (k + 1)) / 2;  // gates before k use 1+2+..+k stages
    return (2 * (base + i) + 1) % n;
  endfunction

endpackage
