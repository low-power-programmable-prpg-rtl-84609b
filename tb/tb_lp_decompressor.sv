// tb_lp_decompressor: the low-power PRPG / decompressor (N=32, M=64, two
// tester channels) driven through PRPG and decompressor pattern sequences
// with random programming, compared every cycle with lp_ref_model (scan
// inputs, latch enables, T state). Also checks behaviour directly:
//  - in a hold period every scan input stays constant from shift to shift;
//  - with Switching = 0000 every latch is enabled;
//  - a low Switching weight gives fewer scan-input transitions than
//    low power switched off;
//  - for five Switching codes the share of enabled control-register bits
//    matches the programmed probability.
module tb_lp_decompressor;
  import lp_prpg_pkg::*;
  localparam int N = 32, M = 64, L = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  code_t rate_codes [5] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b1111};
  int n_hold = 0, n_flip = 0, n_first = 0, n_lpoff = 0, n_nohold = 0;

  logic          det_mode, cfg_we, rg_clear, rg_load, rg_step, lp_step;
  logic          pat_start, first_cycle, t_init;
  lp_cfg_t       cfg;
  code_t         offset;
  logic [N-1:0]  seed, latch_en, exp_en;
  logic [1:0]    inj;
  logic [M-1:0]  scan_in, exp_si, prev_si;
  logic          t_eff, flip, lp_off, no_hold, exp_t;

  lp_decompressor #(.N(N), .M(M), .N_INJ(2)) dut (
    .clk, .rst_n, .det_mode, .cfg_we, .cfg, .seed, .inj, .rg_clear, .rg_load,
    .rg_step, .lp_step, .pat_start, .first_cycle, .t_init, .offset, .scan_in,
    .latch_en, .t_eff, .flip, .lp_off, .no_hold);

  lp_ref_model ref_m (
    .clk, .rst_n, .det_mode, .cfg_we, .cfg(12'(cfg)), .seed, .inj, .rg_clear, .rg_load,
    .rg_step, .lp_step, .pat_start, .first_cycle, .t_init, .offset,
    .exp_scan_in(exp_si), .exp_en, .exp_t_eff(exp_t));

  // compare in every cycle, just before the clock edge
  logic in_hold_prev = 0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (scan_in !== exp_si || latch_en !== exp_en || t_eff !== exp_t) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0t: si %h/%h en %h/%h t %b/%b", $time, scan_in, exp_si,
                 latch_en, exp_en, t_eff, exp_t);
    end
    if (lp_step) begin
      if (in_hold_prev && latch_en == '0) begin
        checks++;
        n_hold++;
        if (scan_in !== prev_si) begin failures++; $display("FAIL hold not constant"); end
      end
      if (lp_off) begin
        n_lpoff++;
        checks++;
        if (latch_en !== '1) begin failures++; $display("FAIL lp_off enables"); end
      end
      if (no_hold) n_nohold++;
      if (flip) n_flip++;
      prev_si      = scan_in;
      in_hold_prev = (latch_en == '0);
    end else if (!first_cycle) in_hold_prev = 0;
    if (first_cycle) begin
      in_hold_prev = 0;
      n_first++;
      checks++;
      if (latch_en !== '1) begin failures++; $display("FAIL first cycle enables"); end
    end
  end

  task automatic idle();
    {cfg_we, rg_clear, rg_load, rg_step, lp_step, pat_start, first_cycle} = '0;
    inj = '0;
  endtask

  // one pattern; returns the number of scan-input transitions
  task automatic run_pattern(bit det, bit first, output int trans);
    logic [M-1:0] last;
    trans = 0;
    if (det) begin
      idle(); rg_clear = 1;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        idle(); rg_step = 1; inj = 2'($urandom);
        if (i == 3) begin
          pat_start = 1; first_cycle = 1;
          t_init = 1'($urandom); offset = 4'($urandom);
        end
        @(posedge clk); #1;
      end
    end else begin
      idle(); pat_start = 1; first_cycle = first;
      t_init = 1'($urandom); offset = 4'($urandom);
      @(posedge clk); #1;
    end
    for (int s = 0; s < L; s++) begin
      idle(); rg_step = 1; lp_step = 1;
      if (det) inj = 2'($urandom);
      #1;
      if (s > 0) trans += $countones(scan_in ^ last);
      last = scan_in;
      @(posedge clk); #1;
    end
    idle();
    @(posedge clk); #1;
  endtask

  task automatic write_cfg(lp_cfg_t c);
    idle(); cfg_we = 1; cfg = c;
    @(posedge clk); #1;
    idle();
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tr, tr_off, tr_low;
    idle(); det_mode = 0; cfg = '0; seed = 32'h1234_5678; t_init = 1; offset = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // PRPG mode: seed, then patterns under random programming
    rg_load = 1;
    @(posedge clk); #1;
    for (int p = 0; p < 40; p++) begin
      lp_cfg_t c;
      c = lp_cfg_t'(12'($urandom));
      if (p % 7 == 3) c.switching = 4'd0;
      if (p % 5 == 2) c.hold = 4'd0;
      write_cfg(c);
      run_pattern(0, p == 0, tr);
    end
    // switching activity: low power off versus weight 1/16 with long holds
    tr_off = 0; tr_low = 0;
    write_cfg('{switching: 4'b0000, hold: 4'b1111, toggle: 4'b1111});
    for (int p = 0; p < 10; p++) begin run_pattern(0, 0, tr); tr_off += tr; end
    write_cfg('{switching: 4'b1000, hold: 4'b1000, toggle: 4'b0001});
    for (int p = 0; p < 10; p++) begin run_pattern(0, 0, tr); tr_low += tr; end
    checks++;
    $display("scan-input transitions: low power off %0d, Switching=1000 %0d", tr_off, tr_low);
    if (!(tr_low * 4 < tr_off)) begin failures++; $display("FAIL switching not reduced"); end
    // programmed rates: mean number of enabled control bits per pattern
    // must match 32*(1 - prod(1 - 2^-(k+1))) within four standard deviations
    foreach (rate_codes[ci]) begin
      real p_exp, mean_exp, sd, ones;
      int n_pat;
      write_cfg('{switching: rate_codes[ci], hold: 4'b0000, toggle: 4'b0001});
      run_pattern(0, 0, tr);        // flushes the map built under the old code
      ones = 0; n_pat = 40;
      p_exp = 1.0;
      for (int k = 0; k < 4; k++) if (rate_codes[ci][k]) p_exp = p_exp * (1.0 - 1.0 / (2 ** (k + 1)));
      p_exp = 1.0 - p_exp;
      for (int p = 0; p < n_pat; p++) begin
        run_pattern(0, 0, tr);
        ones += $countones(dut.u_tcr.ctrl);
      end
      mean_exp = p_exp * N * n_pat;
      sd = $sqrt(mean_exp * (1.0 - p_exp));
      checks++;
      $display("Switching=%b: %0d enabled control bits, expected %0.1f", rate_codes[ci], int'(ones), mean_exp);
      if (ones < mean_exp - 4.0 * sd - 1.0 || ones > mean_exp + 4.0 * sd + 1.0) begin
        failures++;
        $display("FAIL toggling rate for Switching=%b", rate_codes[ci]);
      end
    end
    // decompressor mode
    det_mode = 1;
    for (int p = 0; p < 60; p++) begin
      lp_cfg_t c;
      c = lp_cfg_t'(12'($urandom));
      c.switching = (p % 9 == 4) ? 4'd0 : 4'd1;
      if (p % 6 == 1) c.hold = 4'd0;
      write_cfg(c);
      run_pattern(1, 0, tr);
    end
    checks++;
    if (n_hold == 0 || n_flip == 0 || n_first == 0 || n_lpoff == 0 || n_nohold == 0) begin
      failures++;
      $display("FAIL coverage hold=%0d flip=%0d first=%0d lpoff=%0d nohold=%0d",
               n_hold, n_flip, n_first, n_lpoff, n_nohold);
    end
    $display("events: hold shifts %0d, T flips %0d, first cycles %0d, lp-off shifts %0d, no-hold shifts %0d",
             n_hold, n_flip, n_first, n_lpoff, n_nohold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
