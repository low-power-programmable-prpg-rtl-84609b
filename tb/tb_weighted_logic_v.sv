// tb_weighted_logic_v: for each of the 16 Switching codes, all 1024
// combinations of the ten ring generator stages read by the block (stages
// 1,3,...,19) are applied, with the other stages random. The number of 1s
// must be 1024*(1 - prod(1 - 2^-(k+1))) over the enabled gates k: 512 for
// code 0001, 256 for 0010, 64 for 1000, 0 for 0000, and so on.
module tb_weighted_logic_v;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic [N-1:0] rg;
  logic [3:0]   sw;
  logic         v;

  weighted_logic_v #(.N(N)) dut (.rg, .switching(sw), .v);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int ones, exp_zero;
      sw = 4'(c);
      ones = 0;
      for (int x = 0; x < 1024; x++) begin
        rg = N'($urandom);
        for (int k = 0; k < 10; k++) rg[2 * k + 1] = x[k];
        #1;
        ones += int'(v);
      end
      // zeros: product of (2^(k+1)-1)/2^(k+1) over enabled gates, times 1024
      exp_zero = 1024;
      for (int k = 0; k < 4; k++)
        if (c[k]) exp_zero = exp_zero / (1 << (k + 1)) * ((1 << (k + 1)) - 1);
      checks++;
      if (ones != 1024 - exp_zero) begin
        failures++;
        $display("FAIL code %b: %0d ones, expected %0d", sw, ones, 1024 - exp_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
