// tb_lp_encode: test-compression workload for the decompressor mode of
// lp_bist_top at its default size (N=32, M=64 chains of L=100, two tester
// channels, 4 initialisation cycles).
//
// For every pattern the testbench acts as the encoder: it draws a random
// test cube (care bits at chosen chains and shift cycles), a low-power
// schedule (initial T, offset, Hold and Toggle codes, sometimes No Hold) and
// the toggle-control map wanted for the next pattern (about half of the
// latches enabled). It simulates the decompressor symbolically over GF(2),
// one variable per injected tester bit, writes one linear equation per
// care bit and per next-pattern control bit, and solves them by Gaussian
// elimination (equations that would make the system inconsistent are
// dropped, as an encoder drops a cube bit it cannot place). The solution
// is then streamed into the design, and the testbench checks in the
// running hardware that
//   - every encoded care bit appears on its chain in its shift cycle,
//   - the toggle control register of the next pattern holds the encoded map,
//   - the latch enables follow the predicted hold/toggle schedule,
//   - at least 80 % of the requested care bits were encodable,
//   - scan-input switching stays below 3/4 of that of a run with low power off.
module tb_lp_encode;
  import lp_prpg_pkg::*;
  localparam int N = 32, M = 64, L = 100, INIT = 4, P = 10, K = 40;
  localparam int STEPS = INIT + L;        // injection steps per pattern
  localparam int V = 2 * STEPS;           // variables per pattern
  typedef logic [V-1:0] sym_t;
  typedef logic [V:0]   eqn_t;            // bit V holds the right-hand side

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          normal_mode, start, det_mode, cfg_we, t_init, fault_en;
  logic [15:0]   num_patterns, pattern;
  lp_cfg_t       cfg;
  logic [N-1:0]  seed, latch_en;
  logic [1:0]    ate_in;
  code_t         offset;
  logic [M-1:0]  scan_in, scan_out, golden, signature;
  logic test_mode, busy, done, ate_req, pat_start, scan_shift, capture, pass, fail;
  logic t_eff, flip, lp_off, no_hold, first_cycle;

  lp_bist_top dut (.*);
  cut_model #(.M(M), .L(L)) cut (.clk, .rst_n, .scan_in, .scan_shift, .capture, .fault_en,
                                 .scan_out);

  // per-pattern plan and encoder results
  lp_cfg_t      p_cfg   [P];
  logic         p_tinit [P];
  code_t        p_off   [P];
  logic [N-1:0] p_ctrl  [P + 1];   // toggle control map used by pattern p
  logic [1:0]   p_inj   [P][STEPS];
  logic [M-1:0] care_m  [P][L];
  logic [M-1:0] care_v  [P][L];
  logic [N-1:0] exp_en  [P][L];
  int requested = 0, encoded = 0;

  // ---------------- GF(2) solver ----------------
  eqn_t piv_row [V];
  bit   piv_ok  [V];

  function automatic bit add_eqn(eqn_t e);
    for (int b = V - 1; b >= 0; b--)
      if (e[b] && piv_ok[b]) e ^= piv_row[b];
    if (e[V-1:0] == '0) return (e[V] == 1'b0);   // redundant or inconsistent
    for (int b = V - 1; b >= 0; b--)
      if (e[b]) begin piv_row[b] = e; piv_ok[b] = 1; return 1; end
    return 1;
  endfunction

  // ---------------- symbolic decompressor ----------------
  sym_t rg [N];
  sym_t held [N];

  function automatic void sym_step(int k);
    sym_t fb;
    sym_t n [N];
    fb = rg[N-1];
    n[0] = fb;
    for (int i = 1; i < N; i++) n[i] = rg[i-1];
    n[22] ^= fb; n[2] ^= fb; n[1] ^= fb;       // x^32 + x^22 + x^2 + x + 1
    n[3]  ^= sym_t'(1) << (2 * k);             // channel 0 -> stage 3
    n[19] ^= sym_t'(1) << (2 * k + 1);         // channel 1 -> stage 19
    rg = n;
  endfunction

  function automatic int tap(int j, int t);
    int a;
    a = j % 32;
    if (t == 0) return a;
    if (j < 32) return (t == 1) ? (a + 1) % 32 : (a + 6) % 32;
    return (t == 1) ? (a + 3) % 32 : (a + 11) % 32;
  endfunction

  task automatic encode_pattern(int p);
    eqn_t cand [$];
    int   cand_s [$];
    int   cand_j [$];
    eqn_t e;
    logic t;
    code_t cnt;
    sym_t lat [N];
    for (int b = 0; b < V; b++) begin piv_ok[b] = 0; piv_row[b] = '0; end
    for (int i = 0; i < N; i++) rg[i] = '0;
    // initialisation steps; First cycle in the last one loads the latches
    for (int k = 0; k < INIT; k++) begin
      if (k == INIT - 1) held = rg;
      sym_step(k);
    end
    t = p_tinit[p]; cnt = p_off[p];
    for (int s = 0; s < L; s++) begin
      logic te;
      te = t | (p_cfg[p].hold == 4'd0);
      exp_en[p][s] = te ? p_ctrl[p] : '0;
      for (int i = 0; i < N; i++) lat[i] = exp_en[p][s][i] ? rg[i] : held[i];
      // next pattern's control bit i is the stage-31 bit shifted at L-1-i
      if (s >= L - N) begin
        e = {p_ctrl[p + 1][L - 1 - s], rg[N-1]};
        chk($sformatf("pattern %0d control bit %0d encodable", p + 1, L - 1 - s), add_eqn(e));
      end
      for (int j = 0; j < M; j++)
        if (care_m[p][s][j]) begin
          cand.push_back({care_v[p][s][j], lat[tap(j, 0)] ^ lat[tap(j, 1)] ^ lat[tap(j, 2)]});
          cand_s.push_back(s);
          cand_j.push_back(j);
        end
      held = lat;
      if (cnt == 0) begin cnt = t ? p_cfg[p].hold : p_cfg[p].toggle; t = !t; end
      else cnt = cnt - 1;
      sym_step(INIT + s);
    end
    // care bits after the control map, so the map always gets encoded
    foreach (cand[i]) begin
      requested++;
      if (add_eqn(cand[i])) encoded++;
      else care_m[p][cand_s[i]][cand_j[i]] = 1'b0;   // dropped: not checked later
    end
    // solve: lowest pivot first, free variables random
    begin
      sym_t x;
      for (int b = 0; b < V; b++)
        if (piv_ok[b]) x[b] = piv_row[b][V] ^ (^(piv_row[b][V-1:0] & x & ((sym_t'(1) << b) - 1)));
        else           x[b] = 1'($urandom);
      for (int k = 0; k < STEPS; k++) p_inj[p][k] = {x[2 * k + 1], x[2 * k]};
    end
  endtask

  // ---------------- plan ----------------
  task automatic make_plan();
    p_ctrl[0] = '0;                          // shift register is empty after reset
    for (int p = 0; p < P; p++) begin
      p_cfg[p] = '{switching: 4'b0001, hold: 4'($urandom_range(1, 15)),
                   toggle: 4'($urandom_range(2, 15))};
      if (p % 3 == 2) p_cfg[p].hold = 4'd0;  // No Hold pattern
      p_tinit[p] = 1'($urandom);
      p_off[p]   = 4'($urandom);
      p_ctrl[p + 1] = N'($urandom);
      for (int s = 0; s < L; s++) begin care_m[p][s] = '0; care_v[p][s] = M'({$urandom, $urandom}); end
      if (p > 0)
        for (int c = 0; c < K; c++) care_m[p][$urandom_range(0, L - 1)][$urandom_range(0, M - 1)] = 1'b1;
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int k, s, cur, trans_lp, trans_off;
    logic [M-1:0] last;
    bit have_last;
    normal_mode = 0; start = 0; det_mode = 1; cfg_we = 0; cfg = '0; t_init = 0; offset = 0;
    fault_en = 0; num_patterns = 16'(P); seed = '0; ate_in = '0; golden = '0;
    make_plan();
    for (int p = 0; p < P; p++) encode_pattern(p);
    $display("care bits requested %0d, encoded %0d", requested, encoded);
    chk("encoding efficiency", encoded * 10 >= requested * 8);

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    cfg = p_cfg[0]; cfg_we = 1;
    @(posedge clk); #1;
    cfg_we = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    k = 0; s = 0; cur = 0; trans_lp = 0; have_last = 0;
    while (!done) begin
      cur = int'(pattern);
      if (dut.u_ctl.state == dut.u_ctl.S_CLEAR) begin
        k = 0; s = 0; t_init = p_tinit[cur]; offset = p_off[cur];
      end
      ate_in = (ate_req && k < STEPS) ? p_inj[cur][k] : 2'b00;
      cfg_we = 0;
      if (capture && cur + 1 < P) begin cfg = p_cfg[cur + 1]; cfg_we = 1; end
      #1;
      if (dut.u_ctl.state == dut.u_ctl.S_SHIFT) begin
        if (s == 0) chk($sformatf("pattern %0d control map", cur), dut.u_dec.u_tcr.ctrl === p_ctrl[cur]);
        chk($sformatf("pattern %0d shift %0d latch enables", cur, s), latch_en === exp_en[cur][s]);
        for (int j = 0; j < M; j++)
          if (care_m[cur][s][j]) chk($sformatf("care bit p%0d s%0d c%0d", cur, s, j),
                                     scan_in[j] === care_v[cur][s][j]);
        if (have_last) trans_lp += $countones(scan_in ^ last);
        last = scan_in; have_last = 1;
        s++;
      end else have_last = 0;
      if (ate_req) k++;
      @(posedge clk); #1;
    end
    // same run length with low power off and random tester data
    cfg = '{switching: 4'b0000, hold: 4'b0000, toggle: 4'b0000}; cfg_we = 1;
    @(posedge clk); #1;
    cfg_we = 0; start = 1;
    @(posedge clk); #1;
    start = 0; trans_off = 0; have_last = 0;
    while (!done) begin
      ate_in = ate_req ? 2'($urandom) : 2'b00;
      #1;
      if (dut.u_ctl.state == dut.u_ctl.S_SHIFT && int'(pattern) > 0) begin
        if (have_last) trans_off += $countones(scan_in ^ last);
        last = scan_in; have_last = 1;
      end else have_last = 0;
      @(posedge clk); #1;
    end
    $display("scan-input transitions: encoded low-power patterns %0d, low power off %0d",
             trans_lp, trans_off);
    chk("encoded patterns switch less", trans_lp * 4 < trans_off * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
