// tb_lp_mode_control: T flip-flop and counter against a reference.
// Decompressor mode: after a pattern start with (t_init, offset) the first
// period must last offset+1 steps, then hold periods hold+1 steps and toggle
// periods toggle+1 steps, alternating. PRPG mode: T flips exactly on steps
// where h is 1. No Hold must force t_eff to 1.
module tb_lp_mode_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       det_mode, step, pat_start, t_init, h, no_hold;
  logic [3:0] offset, toggle_reg, hold_reg, count;
  logic       t_q, t_eff, flip;

  lp_mode_control dut (.clk, .rst_n, .det_mode, .step, .pat_start, .t_init, .offset, .h,
                       .toggle_reg, .hold_reg, .no_hold, .t_q, .t_eff, .flip, .count);

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    det_mode = 0; step = 0; pat_start = 0; t_init = 1; h = 0; no_hold = 0;
    offset = 0; toggle_reg = 0; hold_reg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset T", t_q === 1'b1);

    // ---- decompressor mode: period lengths
    det_mode = 1;
    for (int p = 0; p < 40; p++) begin
      int run, exp_len;
      logic cur;
      t_init = 1'($urandom); offset = 4'($urandom);
      toggle_reg = 4'($urandom); hold_reg = 4'($urandom_range(1, 15));
      pat_start = 1; step = 0;
      @(negedge clk);
      pat_start = 0;
      chk("T init", t_q === t_init);
      cur = t_q; run = 0; exp_len = offset + 1;
      for (int s = 0; s < 120; s++) begin
        step = 1;
        @(negedge clk);
        run++;
        if (t_q !== cur) begin
          chk($sformatf("period len %0d exp %0d", run, exp_len), run == exp_len);
          cur = t_q; run = 0;
          exp_len = (cur ? toggle_reg : hold_reg) + 1;
        end
        chk("t_eff", t_eff === t_q);
      end
      // steps off: nothing moves
      step = 0;
      begin
        logic tq0; logic [3:0] c0;
        tq0 = t_q; c0 = count;
        repeat (3) @(negedge clk);
        chk("idle", t_q === tq0 && count === c0);
      end
    end

    // ---- No Hold override
    no_hold = 1;
    pat_start = 1; t_init = 0; offset = 3;
    @(negedge clk);
    pat_start = 0;
    chk("no_hold t_eff", t_eff === 1'b1 && t_q === 1'b0);
    no_hold = 0;
    #1 chk("no_hold released", t_eff === 1'b0);

    // ---- PRPG mode: T follows h
    det_mode = 0;
    for (int i = 0; i < 1000; i++) begin
      logic tq0;
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      h    = ($urandom_range(0, 4) == 0);
      tq0  = t_q;
      #1 chk("flip out", flip === (step && h));
      @(negedge clk);
      chk("T follows h", t_q === (tq0 ^ (step && h)));
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
