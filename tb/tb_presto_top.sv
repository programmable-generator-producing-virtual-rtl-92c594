// tb_presto_top: end-to-end test of the PRESTO generator at its default
// size (32-stage PRPG, 16 scan chains, 64 shift cycles per pattern).
//
// A cycle-accurate reference model written from the block descriptions runs
// beside the design: PRPG recurrence a[t] = a[t-10]^a[t-30]^a[t-31]^a[t-32],
// weighted enable bits, shift and toggle control registers, shadow
// configuration, hold/toggle periods computed from the position in the
// pattern, hold latches and the XOR-of-three phase shifter. Every shift and
// idle cycle compares scan_in, pattern_end, toggle_phase, latch_en and the
// active configuration with the model.
//
// Besides the exact comparison the test checks properties directly on the
// design's outputs: in a hold period every scan chain repeats its previous
// value; a chain whose three latches are all off in the toggle control
// register stays constant through the whole pattern; the average fraction of
// latches in toggle mode follows the switching code. Each mechanism must
// occur at least once: toggle control reload, hold period, toggle period,
// low-power-off pattern, configuration written mid-pattern and deferred to
// the next pattern, capture cycles, reseeding, tester data injection and a
// frozen (low-power) scan chain.
module tb_presto_top;
  import presto_pkg::*;

  localparam int N = 32, M = 16, L = 64, C = 2;

  logic           clk = 0;
  logic           rst_n, shift_en, cfg_we, seed_load, inj_en;
  presto_cfg_t    cfg_in, cfg_active;
  logic [N-1:0]   seed, latch_en;
  logic [C-1:0]   inj_data;
  logic [M-1:0]   scan_in;
  logic [5:0]     shift_count;
  logic           pattern_end, toggle_phase;

  always #5 clk = ~clk;

  presto_top dut (.clk, .rst_n, .shift_en, .cfg_we, .cfg_in, .seed_load, .seed, .inj_en,
                  .inj_data, .scan_in, .shift_count, .pattern_end, .toggle_phase, .latch_en,
                  .cfg_active);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_reload = 0, n_hold = 0, n_toggle = 0, n_lpoff = 0, n_deferred = 0;
  int n_capture = 0, n_reseed = 0, n_inject = 0, n_frozen = 0;

  // ---------------- reference model state ----------------
  logic [N-1:0] m_prpg, m_sreg, m_tcr, m_held;
  presto_cfg_t  m_stage, m_act;
  int           m_pos;   // shift cycle within pattern

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [N-1:0] m_step(input logic [N-1:0] s);
    return {s[N-2:0], s[9] ^ s[29] ^ s[30] ^ s[31]};
  endfunction

  function automatic logic m_weight(input logic [3:0] sw, input logic [N-1:0] p);
    return (sw[0] & p[1]) | (sw[1] & p[3] & p[5]) | (sw[2] & p[7] & p[9] & p[11]) |
           (sw[3] & p[13] & p[15] & p[17] & p[19]);
  endfunction

  function automatic logic m_phase(input presto_cfg_t c, input int pos);
    int tl;
    tl = (c.toggle_len == 0) ? 1 : int'(c.toggle_len);
    if (c.hold_len == 0) return 1'b1;
    return (pos % (tl + int'(c.hold_len))) < tl;
  endfunction

  function automatic logic [N-1:0] m_en();
    logic lp_off;
    lp_off = (m_act.switching == 0);
    return m_phase(m_act, m_pos) ? (m_tcr | {N{lp_off}}) : '0;
  endfunction

  function automatic logic [N-1:0] m_q();
    logic [N-1:0] en;
    en = m_en();
    return (en & m_prpg) | (~en & m_held);
  endfunction

  function automatic logic [M-1:0] m_out();
    logic [N-1:0] q;
    logic [M-1:0] o;
    q = m_q();
    for (int j = 0; j < M; j++) o[j] = q[(3*j) % N] ^ q[(3*j + 10) % N] ^ q[(3*j + 22) % N];
    return o;
  endfunction

  // compare design with model in the current cycle (inputs applied)
  task automatic compare(input string where);
    check(scan_in == m_out(), $sformatf("%s scan_in %h expected %h", where, scan_in, m_out()));
    check(pattern_end == (m_pos == L - 1), {where, " pattern_end"});
    check(shift_count == 6'(m_pos), {where, " shift_count"});
    check(toggle_phase == m_phase(m_act, m_pos), {where, " toggle_phase"});
    check(latch_en == m_en(), {where, " latch_en"});
    check(cfg_active == m_act, {where, " cfg_active"});
  endtask

  // advance the model by one clock edge
  task automatic model_edge();
    logic [N-1:0] q, nxt;
    logic         wbit;
    q = m_q();
    wbit = m_weight(m_act.switching, m_prpg);
    if (shift_en) begin
      if (m_pos == L - 1) begin
        m_tcr = m_sreg;
        m_act = m_stage;
      end
      m_sreg = {m_sreg[N-2:0], wbit};
      m_held = q;
      m_pos  = (m_pos + 1) % L;
    end
    if (seed_load) m_prpg = seed;
    else if (shift_en) begin
      nxt = m_step(m_prpg);
      if (inj_en) begin
        nxt[0]  ^= inj_data[0];
        nxt[16] ^= inj_data[1];
      end
      m_prpg = nxt;
    end
    if (cfg_we) m_stage = cfg_in;
  endtask

  // one clock with the given inputs; compare before the edge
  task automatic cycle(input string where);
    #1;
    compare(where);
    @(posedge clk);
    model_edge();
    @(negedge clk);
    cfg_we = 0; seed_load = 0;
  endtask

  // one pattern: L shift cycles with random idle cycles, then capture cycles
  task automatic run_pattern(input bit inject, input int write_at, input presto_cfg_t new_cfg);
    logic [M-1:0] first_out, prev_out;
    logic [N-1:0] tcr_now;
    presto_cfg_t  act_now;
    bit           changed [M];
    int           ones;
    tcr_now = m_tcr;
    act_now = m_act;
    if (act_now.switching == 0) n_lpoff++;
    for (int j = 0; j < M; j++) changed[j] = 0;
    for (int c = 0; c < L; c++) begin
      while ($urandom % 5 == 0) begin
        shift_en = 0; inj_en = 0;
        cycle("idle");
      end
      shift_en = 1;
      inj_en = inject;
      inj_data = 2'($urandom);
      if (inject) n_inject++;
      if (c == write_at) begin
        cfg_we = 1;
        cfg_in = new_cfg;
      end
      #1;
      if (c == 0) first_out = scan_in;
      else begin
        for (int j = 0; j < M; j++) if (scan_in[j] != prev_out[j]) changed[j] = 1;
        if (!toggle_phase) check(scan_in == prev_out, "hold period repeats the last value");
      end
      if (toggle_phase) n_toggle++; else n_hold++;
      if (c > write_at && write_at >= 0) begin
        check(cfg_active == act_now, "configuration deferred to next pattern");
        if (c == L - 1 && new_cfg != act_now) n_deferred++;
      end
      prev_out = scan_in;
      cycle("shift");
    end
    n_reload++;
    // chains fed only by latches that are off in the toggle control register
    if (act_now.switching != 0) begin
      for (int j = 0; j < M; j++) begin
        if (!tcr_now[(3*j) % N] && !tcr_now[(3*j + 10) % N] && !tcr_now[(3*j + 22) % N]) begin
          check(!changed[j], $sformatf("chain %0d frozen for the pattern", j));
          n_frozen++;
        end
      end
    end
    // capture cycles: generator frozen
    shift_en = 0; inj_en = 0;
    repeat (2) begin
      logic [M-1:0] before_cap;
      before_cap = scan_in;
      cycle("capture");
      check(scan_in == before_cap, "capture keeps scan_in");
      n_capture++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    presto_cfg_t cfg;
    real frac_half, frac_16th;
    int  pats_half, pats_16th;
    shift_en = 0; cfg_we = 0; cfg_in = '0; seed_load = 0; seed = '0; inj_en = 0; inj_data = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_prpg = 32'h1; m_sreg = '0; m_tcr = '1; m_held = '0; m_stage = '0; m_act = '0; m_pos = 0;

    // pattern 0: reset configuration (low power off); a write mid-pattern
    // must wait for the next pattern
    cfg = '{switching: 4'b0001, hold_len: 4'd0, toggle_len: 4'd0};
    run_pattern(0, 20, cfg);
    // switching code 0001 (about half the latches toggle) for a few patterns
    frac_half = 0; pats_half = 0;
    repeat (6) begin
      run_pattern(0, -1, cfg);
      frac_half += real'($countones(m_tcr)) / N; pats_half++;
    end
    // code 1000 (about 1 latch in 16)
    cfg = '{switching: 4'b1000, hold_len: 4'd0, toggle_len: 4'd0};
    run_pattern(0, 5, cfg);
    frac_16th = 0; pats_16th = 0;
    repeat (6) begin
      run_pattern(0, -1, cfg);
      frac_16th += real'($countones(m_tcr)) / N; pats_16th++;
    end
    frac_half /= pats_half;
    frac_16th /= pats_16th;
    check(frac_half > 0.3 && frac_half < 0.7, $sformatf("toggle fraction %f for code 0001", frac_half));
    check(frac_16th < 0.2, $sformatf("toggle fraction %f for code 1000", frac_16th));
    // hold and toggle periods
    cfg = '{switching: 4'b0011, hold_len: 4'd5, toggle_len: 4'd3};
    run_pattern(0, 0, cfg);
    run_pattern(0, -1, cfg);
    // random configurations, with reseeding and injection
    for (int p = 0; p < 30; p++) begin
      cfg = presto_cfg_t'($urandom);
      if (p % 7 == 0) cfg.switching = 0;
      if (p % 5 == 2) begin
        // reseed during the capture gap
        seed = $urandom;
        seed_load = 1;
        shift_en = 0;
        cycle("reseed");
        n_reseed++;
      end
      run_pattern(p % 4 == 1, $urandom % L, cfg);
    end

    $display("mechanisms: reload=%0d hold=%0d toggle=%0d lpoff=%0d deferred=%0d capture=%0d reseed=%0d inject=%0d frozen_chain=%0d",
             n_reload, n_hold, n_toggle, n_lpoff, n_deferred, n_capture, n_reseed, n_inject, n_frozen);
    check(n_reload > 0, "reload happened");
    check(n_hold > 0, "hold period happened");
    check(n_toggle > 0, "toggle period happened");
    check(n_lpoff > 0, "low-power-off pattern happened");
    check(n_deferred > 0, "deferred configuration happened");
    check(n_capture > 0, "capture happened");
    check(n_reseed > 0, "reseed happened");
    check(n_inject > 0, "injection happened");
    check(n_frozen > 0, "frozen chain happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
