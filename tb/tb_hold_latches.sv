// tb_hold_latches: random enables and data; each output must equal the
// input while enabled and the last value it showed while disabled (value
// seen in the last update cycle), the stored copy changing only on upd.
module tb_hold_latches;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         upd;
  logic [N-1:0] en, d, q, last;

  hold_latches #(.N(N)) dut (.clk, .rst_n, .upd, .en, .d, .q);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd = 0; en = '0; d = '0; last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      upd = ($urandom_range(0, 4) != 0);
      en  = (i % 500 < 100) ? '0 : N'({$urandom, $urandom}) & N'({$urandom, $urandom});
      d   = N'({$urandom, $urandom});
      #1;
      for (int b = 0; b < N; b++) begin
        checks++;
        if (q[b] !== (en[b] ? d[b] : last[b])) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d bit %0d", i, b);
        end
      end
      if (upd) last = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
