// tb_bist_controller: L=12, INIT_CYCLES=3. For both modes and several
// pattern counts it counts every strobe from start to done and checks the
// totals: PRPG 1 seed load, P pattern starts, 1 First cycle, (P+1)*L shift
// cycles, P captures, 1+P*(L+2)+L cycles; decompressor P clears,
// P*INIT ring generator initialisation steps, P First cycles,
// P*(INIT+L+2)+L cycles. Also: normal mode blocks start and aborts a run,
// and First cycle/pattern start fall on the last initialisation cycle.
module tb_bist_controller;
  localparam int L = 12, INIT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        normal_mode, start, det_mode;
  logic [15:0] num_patterns, pattern;
  logic test_mode, rg_clear, rg_load, rg_step, lp_step, pat_start, first_cycle;
  logic scan_shift, capture, misr_clear, misr_en, busy, done;

  bist_controller #(.L(L), .INIT_CYCLES(INIT)) dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit det, int p);
    int cyc, n_clear, n_load, n_rgstep, n_shift, n_pat, n_first, n_cap, n_mclr, init_run;
    cyc = 0; n_clear = 0; n_load = 0; n_rgstep = 0; n_shift = 0; n_pat = 0;
    n_first = 0; n_cap = 0; n_mclr = 0; init_run = 0;
    det_mode = det; num_patterns = 16'(p);
    start = 1;
    #1;
    n_mclr += int'(misr_clear);
    @(posedge clk); #1;
    start = 0;
    while (!done && cyc < 100000) begin
      cyc++;
      n_clear += int'(rg_clear); n_load += int'(rg_load);
      n_rgstep += int'(rg_step && !lp_step); n_shift += int'(scan_shift);
      n_pat += int'(pat_start); n_first += int'(first_cycle); n_cap += int'(capture);
      n_mclr += int'(misr_clear);
      if (rg_step && !lp_step) init_run++;
      if (pat_start && det) begin
        checks++;
        if (!(first_cycle && rg_step && init_run == INIT)) begin
          failures++; $display("FAIL first cycle not on last init step");
        end
      end
      if (lp_step) init_run = 0;
      if (scan_shift != misr_en || scan_shift != lp_step) begin
        checks++; failures++; $display("FAIL strobe mismatch");
      end
      @(posedge clk); #1;
    end
    chk("cycles", cyc, det ? p * (INIT + L + 2) + L : 1 + p * (L + 2) + L);
    chk("shift", n_shift, (p + 1) * L);
    chk("pattern starts", n_pat, p);
    chk("captures", n_cap, p);
    chk("first cycles", n_first, det ? p : 1);
    chk("seed loads", n_load, det ? 0 : 1);
    chk("clears", n_clear, det ? p : 0);
    chk("init steps", n_rgstep, det ? p * INIT : 0);
    chk("misr clears", n_mclr, 1);
    chk("pattern index", int'(pattern), p - 1);
    chk("busy at done", int'(busy), 0);
  endtask

  initial begin
    normal_mode = 1; start = 0; det_mode = 0; num_patterns = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // normal mode: start is ignored
    start = 1;
    repeat (3) @(posedge clk);
    #1 chk("normal mode idle", int'(busy || rg_step || scan_shift), 0);
    chk("test_mode low", int'(test_mode), 0);
    start = 0;
    normal_mode = 0;
    #1 chk("test_mode high", int'(test_mode), 1);
    for (int p = 1; p <= 4; p++) begin
      run(0, p);
      run(1, p);
    end
    // abort through normal mode
    det_mode = 1; num_patterns = 5; start = 1;
    @(posedge clk); #1 start = 0;
    repeat (20) @(posedge clk);
    normal_mode = 1;
    @(posedge clk); #1;
    chk("abort", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
