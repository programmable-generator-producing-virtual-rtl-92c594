// tb_presto_decompress: the generator used as a test data decompressor.
//
// Deterministic patterns are encoded the way a compression flow would do it:
// every scan chain bit of the next pattern is a linear (XOR) function of the
// 32 seed bits, the 2 x 64 injected tester bits and constants already in the
// hold latches. The testbench builds these functions by running a symbolic
// copy of the generator (each bit a 161-bit vector: 160 variables plus a
// constant), using the toggle control register and the hold/toggle lengths
// in force for that pattern. It then picks random care bits (a chain, a shift
// cycle and a value), solves for seed and injections by Gaussian elimination
// over GF(2), loads the seed in the capture gap, injects the data during the
// shift and checks that every encodable care bit appears on scan_in, and
// that every other scan chain bit equals its symbolic prediction. Patterns
// are run with the low-power function off and with low toggling plus hold
// periods, where fewer care bits can be encoded because frozen chains and
// hold periods give no free variables.
module tb_presto_decompress;
  import presto_pkg::*;

  localparam int N = 32, M = 16, L = 64, V = 160;  // variables: seed 0..31, injections 32..159
  typedef logic [V:0] lin_t;                       // bit V: constant term

  logic         clk = 0;
  logic         rst_n, shift_en, cfg_we, seed_load, inj_en;
  presto_cfg_t  cfg_in, cfg_active;
  logic [N-1:0] seed, latch_en;
  logic [1:0]   inj_data;
  logic [M-1:0] scan_in;
  logic [5:0]   shift_count;
  logic         pattern_end, toggle_phase;
  int checks = 0, failures = 0, encoded = 0, rejected = 0;

  always #5 clk = ~clk;

  presto_top dut (.clk, .rst_n, .shift_en, .cfg_we, .cfg_in, .seed_load, .seed, .inj_en,
                  .inj_data, .scan_in, .shift_count, .pattern_end, .toggle_phase, .latch_en,
                  .cfg_active);

  lin_t eqn [L][M];   // symbolic value of scan_in[j] in shift cycle t

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit phase_at(input presto_cfg_t c, input int pos);
    int tl;
    tl = (c.toggle_len == 0) ? 1 : int'(c.toggle_len);
    if (c.hold_len == 0) return 1'b1;
    return (pos % (tl + int'(c.hold_len))) < tl;
  endfunction

  // symbolic run of the next pattern; tcr and held are its starting values
  task automatic build_equations(input logic [N-1:0] tcr, input logic [N-1:0] held0,
                                 input presto_cfg_t c);
    lin_t st [N], q [N], held [N], fb;
    bit lp_off;
    lp_off = (c.switching == 0);
    for (int i = 0; i < N; i++) begin
      st[i] = '0; st[i][i] = 1'b1;
      held[i] = '0; held[i][V] = held0[i];
    end
    for (int t = 0; t < L; t++) begin
      for (int i = 0; i < N; i++)
        q[i] = (phase_at(c, t) && (tcr[i] || lp_off)) ? st[i] : held[i];
      for (int j = 0; j < M; j++)
        eqn[t][j] = q[(3*j) % N] ^ q[(3*j + 10) % N] ^ q[(3*j + 22) % N];
      held = q;
      fb = st[9] ^ st[29] ^ st[30] ^ st[31];
      for (int i = N - 1; i > 0; i--) st[i] = st[i-1];
      st[0] = fb;
      st[0][32 + 2*t]      ^= 1'b1;
      st[16][32 + 2*t + 1] ^= 1'b1;
    end
  endtask

  function automatic bit eval(input lin_t e, input logic [V-1:0] x);
    return e[V] ^ (^(e[V-1:0] & x));
  endfunction

  task automatic run_encoded_pattern(input int n_care);
    lin_t rows [$];
    int   pivots [$];
    int   care_t [$], care_j [$];
    bit   care_v [$];
    logic [V-1:0] x;
    // pick care bits and add them one by one to a reduced system
    for (int k = 0; k < n_care; k++) begin
      int t, j;
      bit v;
      lin_t r;
      t = $urandom % L; j = $urandom % M; v = $urandom;
      r = eqn[t][j];
      r[V] ^= v;                 // want vars . coeff = v ^ const
      foreach (rows[i]) if (r[pivots[i]]) r ^= rows[i];
      if (r[V-1:0] == '0) begin
        if (r[V]) begin rejected++; continue; end  // contradicts earlier care bits
      end else begin
        int p;
        p = 0;
        while (!r[p]) p++;
        foreach (rows[i]) if (rows[i][p]) rows[i] ^= r;
        rows.push_back(r);
        pivots.push_back(p);
      end
      care_t.push_back(t); care_j.push_back(j); care_v.push_back(v);
    end
    // free variables random, pivots solved (rows are fully reduced)
    x = {$urandom, $urandom, $urandom, $urandom, $urandom};
    foreach (pivots[i]) x[pivots[i]] = 1'b0;
    foreach (rows[i]) x[pivots[i]] = rows[i][V] ^ (^(rows[i][V-1:0] & x));
    // load seed in the capture gap
    seed = x[31:0]; seed_load = 1; shift_en = 0; inj_en = 0;
    @(negedge clk);
    seed_load = 0;
    for (int t = 0; t < L; t++) begin
      shift_en = 1; inj_en = 1;
      inj_data = {x[32 + 2*t + 1], x[32 + 2*t]};
      #1;
      for (int j = 0; j < M; j++) begin
        checks++;
        if (scan_in[j] !== eval(eqn[t][j], x)) begin
          failures++;
          if (failures < 10) $display("FAIL prediction t=%0d chain %0d", t, j);
        end
      end
      foreach (care_t[k]) if (care_t[k] == t) begin
        checks++;
        encoded++;
        if (scan_in[care_j[k]] !== care_v[k]) begin
          failures++;
          $display("FAIL care bit t=%0d chain %0d", t, care_j[k]);
        end
      end
      @(negedge clk);
    end
    shift_en = 0; inj_en = 0;
    repeat (2) @(negedge clk);   // capture
  endtask

  task automatic plain_pattern();
    shift_en = 1;
    repeat (L) @(negedge clk);
    shift_en = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    presto_cfg_t cfgs [3];
    int enc_before, rej_before;
    shift_en = 0; cfg_we = 0; cfg_in = '0; seed_load = 0; seed = '0; inj_en = 0; inj_data = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfgs[0] = '{switching: 4'b0000, hold_len: 4'd0, toggle_len: 4'd0};
    cfgs[1] = '{switching: 4'b0011, hold_len: 4'd0, toggle_len: 4'd0};
    cfgs[2] = '{switching: 4'b0010, hold_len: 4'd3, toggle_len: 4'd5};
    foreach (cfgs[c]) begin
      cfg_in = cfgs[c]; cfg_we = 1;
      @(negedge clk);
      cfg_we = 0;
      plain_pattern();   // configuration becomes active
      plain_pattern();   // toggle control register built under it
      for (int p = 0; p < 4; p++) begin
        // state at the start of the next pattern, as the encoder would know it
        enc_before = encoded; rej_before = rejected;
        build_equations(latch_en, dut.u_latches.held, cfg_active);
        run_encoded_pattern(c == 0 ? 120 : 60);
        $display("switching %b hold %0d toggle %0d: %0d care bits encoded, %0d rejected",
                 cfgs[c].switching, cfgs[c].hold_len, cfgs[c].toggle_len,
                 encoded - enc_before, rejected - rej_before);
      end
    end
    checks++;
    if (encoded < 300) begin failures++; $display("FAIL only %0d care bits encoded", encoded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
