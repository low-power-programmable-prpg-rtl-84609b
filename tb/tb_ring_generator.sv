// tb_ring_generator: self-checking test of ring_generator.
// Instance A (N=32, 2 tester channels) is compared cycle by cycle with a
// reference written from the polynomial x^32+x^22+x^2+x+1 and the injector
// positions 3 and 19; clear, seed load and hold (step=0) are exercised.
// Instance B (N=16) must return to its seed after exactly 2^16-1 steps and
// not before (maximal period).
module tb_ring_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clear, load, step;
  logic [31:0] seed, st, ref_st;
  logic [1:0]  inj;

  ring_generator #(.N(32), .N_INJ(2)) dut (
    .clk, .rst_n, .clear, .load, .seed, .step, .inj, .state(st));

  logic        b_load, b_step;
  logic [15:0] b_st;
  ring_generator #(.N(16), .N_INJ(1)) dut_b (
    .clk, .rst_n, .clear(1'b0), .load(b_load), .seed(16'h0001), .step(b_step),
    .inj(1'b0), .state(b_st));

  function automatic logic [31:0] ref_next(logic [31:0] s, logic [1:0] in);
    logic [31:0] n;
    logic fb;
    fb = s[31];
    n  = {s[30:0], fb};
    if (fb) begin n[22] ^= 1'b1; n[2] ^= 1'b1; n[1] ^= 1'b1; end
    n[3]  ^= in[0];
    n[19] ^= in[1];
    return n;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; load = 0; step = 0; seed = '0; inj = '0; b_load = 0; b_step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset", st, '0);
    // seed load
    seed = 32'hDEAD_BEEF; load = 1;
    @(negedge clk); load = 0;
    chk("load", st, 32'hDEAD_BEEF);
    ref_st = st;
    // free run and injection, random step gating
    for (int i = 0; i < 2000; i++) begin
      step = ($urandom_range(0, 3) != 0);
      inj  = (i < 1000) ? 2'b00 : 2'($urandom);
      if (step) ref_st = ref_next(ref_st, inj);
      @(negedge clk);
      chk("step", st, ref_st);
    end
    step = 0;
    // clear beats load
    clear = 1; load = 1;
    @(negedge clk); clear = 0; load = 0;
    chk("clear", st, '0);
    // from zero, only injection moves the register
    step = 1; inj = 2'b01;
    @(negedge clk); step = 0; inj = 0;
    chk("inject from zero", st, 32'h0000_0008);
    // maximal period of the 16-bit instance
    b_load = 1;
    @(negedge clk); b_load = 0; b_step = 1;
    begin
      int unsigned cnt;
      cnt = 0;
      do begin
        @(negedge clk);
        cnt++;
      end while (b_st != 16'h0001 && cnt < 70000);
      b_step = 0;
      checks++;
      if (cnt != 65535) begin failures++; $display("FAIL period %0d", cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
