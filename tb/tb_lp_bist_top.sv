// tb_lp_bist_top: end-to-end test of the low-power BIST / decompressor at
// its default size (N=32 ring generator, M=64 scan chains of L=100 cells,
// two tester channels), with cut_model as the circuit under test and
// lp_ref_model checking the pattern source in every cycle.
// Runs:
//   1. normal mode: start is ignored, no test strobe;
//   2. PRPG (logic BIST) run with low power on; the signature must equal
//      a reference MISR of the observed scan outputs and the run must take
//      1 + P*(L+2) + L cycles; its signature becomes the golden value;
//   3. the same run after reset with that golden value: pass;
//   4. the same run with a defect in the CUT: fail;
//   5. PRPG run with low power off: more scan-input transitions than run 2;
//   6. decompressor run with random tester data, per-pattern T/offset and
//      reprogramming (including No Hold) in capture cycles; P*(INIT+L+2)+L
//      cycles.
// Every mechanism (hold period, toggle period, H-driven flip, counter-driven
// flip, No Hold, low power off, First cycle, mode switch, pass, fail, normal
// mode) is counted and must occur at least once.
module tb_lp_bist_top;
  import lp_prpg_pkg::*;
  localparam int N = 32, M = 64, L = 100, INIT = 4, P = 20;
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

  logic [M-1:0] exp_si;
  logic [N-1:0] exp_en;
  logic         exp_t;
  lp_ref_model ref_m (
    .clk, .rst_n, .det_mode, .cfg_we, .cfg(12'(cfg)), .seed, .inj(ate_in),
    .rg_clear(dut.rg_clear), .rg_load(dut.rg_load), .rg_step(dut.rg_step),
    .lp_step(dut.lp_step), .pat_start, .first_cycle, .t_init, .offset,
    .exp_scan_in(exp_si), .exp_en, .exp_t_eff(exp_t));

  // reference signature of what the CUT returns
  function automatic logic [M-1:0] misr(logic [M-1:0] s, logic [M-1:0] d);
    logic [M-1:0] n;
    n = {s[M-2:0], s[M-1]};
    if (s[M-1]) begin n[63] ^= 1'b1; n[61] ^= 1'b1; n[60] ^= 1'b1; end
    return n ^ d;
  endfunction

  int n_hold = 0, n_toggle = 0, n_hflip = 0, n_cflip = 0, n_nohold = 0, n_lpoff = 0;
  int n_first = 0, n_prpg = 0, n_det = 0, n_pass = 0, n_fail = 0, n_normal = 0;
  int trans;
  logic [M-1:0] ref_sig, last_si;
  logic         have_last;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (scan_in !== exp_si || latch_en !== exp_en || t_eff !== exp_t) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: pattern source differs from reference", $time);
    end
    if (scan_shift) begin
      ref_sig = misr(ref_sig, scan_out);
      if (have_last) trans += $countones(scan_in ^ last_si);
      last_si = scan_in; have_last = 1;
      if (!lp_off && !no_hold && !t_eff) n_hold++;
      if (t_eff) n_toggle++;
      if (no_hold) n_nohold++;
      if (lp_off) n_lpoff++;
      if (flip && !det_mode) n_hflip++;
      if (flip && det_mode) n_cflip++;
      if (det_mode) n_det++; else n_prpg++;
    end
    if (first_cycle) n_first++;
    if (capture) have_last = 0;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
  endtask

  task automatic write_cfg(lp_cfg_t c);
    cfg = c; cfg_we = 1;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  // one complete test run; returns cycles from start to done
  task automatic run_test(bit det, output int cycles);
    det_mode = det; num_patterns = 16'(P);
    ref_sig = '0; trans = 0; have_last = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 0;  // the start edge only leaves IDLE
    while (!done && cycles < 100000) begin
      // tester side: data for the ring generator, per-pattern settings,
      // reprogramming in capture cycles (decompressor run)
      ate_in = ate_req ? 2'($urandom) : 2'b00;
      if (det && capture) begin
        lp_cfg_t c;
        c = lp_cfg_t'(12'($urandom));
        c.switching = 4'b0001;
        if (pattern % 4 == 1) c.hold = 4'd0;
        cfg = c; cfg_we = 1;
      end else cfg_we = 0;
      if (det && dut.u_ctl.state == dut.u_ctl.S_CLEAR) begin
        t_init = 1'($urandom); offset = 4'($urandom);
      end
      @(posedge clk); #1;
      cycles++;
    end
    cfg_we = 0; ate_in = '0;
    chk("signature matches reference MISR of scan outputs", signature === ref_sig);
  endtask

  initial begin
    int cyc, trans_lp, trans_off;
    logic [M-1:0] gold;
    normal_mode = 1; start = 0; det_mode = 0; cfg_we = 0; cfg = '0; t_init = 1; offset = 0;
    fault_en = 0; num_patterns = P; seed = 32'hACE1_2468; ate_in = '0; golden = '0;
    do_reset();

    // 1. normal mode
    start = 1;
    repeat (5) @(posedge clk);
    #1;
    chk("normal mode ignores start", !busy && !scan_shift && !test_mode);
    if (!busy) n_normal++;
    start = 0;
    normal_mode = 0;

    // 2. PRPG run, low power on: 3/4 toggle weight... Switching=0011, H codes
    write_cfg('{switching: 4'b0011, hold: 4'b0100, toggle: 4'b0010});
    t_init = 1; offset = 0;
    run_test(0, cyc);
    chk($sformatf("PRPG cycles %0d", cyc), cyc == 1 + P * (L + 2) + L);
    gold = signature; trans_lp = trans;
    chk("no compare verdict without golden", done && (pass || fail));

    // 3. repeat with the golden signature: pass
    do_reset();
    write_cfg('{switching: 4'b0011, hold: 4'b0100, toggle: 4'b0010});
    golden = gold;
    run_test(0, cyc);
    chk("good circuit passes", pass && !fail);
    if (pass) n_pass++;

    // 4. defective circuit: fail
    do_reset();
    write_cfg('{switching: 4'b0011, hold: 4'b0100, toggle: 4'b0010});
    fault_en = 1;
    run_test(0, cyc);
    chk("defective circuit fails", fail && !pass);
    if (fail) n_fail++;
    fault_en = 0;

    // 5. low power off
    do_reset();
    write_cfg('{switching: 4'b0000, hold: 4'b0100, toggle: 4'b0010});
    run_test(0, cyc);
    trans_off = trans;
    $display("scan-input transitions per run: low power %0d, low power off %0d", trans_lp, trans_off);
    chk("low power reduces scan-input transitions", trans_lp * 2 < trans_off);

    // 6. decompressor run (mode switch without reset)
    write_cfg('{switching: 4'b0001, hold: 4'b0011, toggle: 4'b0101});
    run_test(1, cyc);
    chk($sformatf("decompressor cycles %0d", cyc), cyc == P * (INIT + L + 2) + L);

    $display("events: hold %0d toggle %0d H-flips %0d counter-flips %0d no-hold %0d lp-off %0d first %0d prpg %0d decomp %0d pass %0d fail %0d normal %0d",
             n_hold, n_toggle, n_hflip, n_cflip, n_nohold, n_lpoff, n_first, n_prpg, n_det,
             n_pass, n_fail, n_normal);
    chk("every mechanism exercised",
        n_hold > 0 && n_toggle > 0 && n_hflip > 0 && n_cflip > 0 && n_nohold > 0 &&
        n_lpoff > 0 && n_first > 0 && n_prpg > 0 && n_det > 0 && n_pass > 0 &&
        n_fail > 0 && n_normal > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
