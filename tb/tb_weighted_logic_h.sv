// tb_weighted_logic_h: the T state must select the Toggle register (T=1)
// or the Hold register (T=0) as the weight code; for each code and each
// T value all 1024 combinations of stages 0,2,...,18 are applied and the
// count of 1s compared with 1024*(1 - prod(1 - 2^-(k+1))).
module tb_weighted_logic_h;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic [N-1:0] rg;
  logic [3:0]   tr, hr;
  logic         t, h;

  weighted_logic_h #(.N(N)) dut (.rg, .t_state(t), .toggle_reg(tr), .hold_reg(hr), .h);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tt = 0; tt < 2; tt++) begin
      for (int c = 0; c < 16; c++) begin
        int ones, exp_zero;
        t = tt[0];
        // the watched register gets the code, the other one its complement
        if (t) begin tr = 4'(c); hr = ~4'(c); end
        else   begin hr = 4'(c); tr = ~4'(c); end
        ones = 0;
        for (int x = 0; x < 1024; x++) begin
          rg = N'($urandom);
          for (int k = 0; k < 10; k++) rg[2 * k] = x[k];
          #1;
          ones += int'(h);
        end
        exp_zero = 1024;
        for (int k = 0; k < 4; k++)
          if (c[k]) exp_zero = exp_zero / (1 << (k + 1)) * ((1 << (k + 1)) - 1);
        checks++;
        if (ones != 1024 - exp_zero) begin
          failures++;
          $display("FAIL t=%0d code %0d: %0d ones, expected %0d", t, c, ones, 1024 - exp_zero);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
