// tb_down_counter: preset, decrement, reload at zero and hold when not
// enabled, against a reference counter; also checks that a reload value v
// gives a period of exactly v+1 enabled cycles between zero flags.
module tb_down_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       preset, en, zero;
  logic [3:0] offset, reload_val, count, ref_cnt;

  down_counter dut (.clk, .rst_n, .preset, .offset, .en, .reload_val, .count, .zero);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    preset = 0; en = 0; offset = 0; reload_val = 0; ref_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (count !== ref_cnt) begin failures++; $display("FAIL count %0d %0d", count, ref_cnt); end
      if (zero !== (ref_cnt == 0)) begin failures++; $display("FAIL zero"); end
      preset     = ($urandom_range(0, 30) == 0);
      en         = ($urandom_range(0, 3) != 0);
      offset     = 4'($urandom);
      reload_val = 4'($urandom);
      if (preset)  ref_cnt = offset;
      else if (en) ref_cnt = (ref_cnt == 0) ? reload_val : ref_cnt - 1;
    end
    // period test: fixed reload value 9 -> zero every 10 cycles
    @(negedge clk);
    preset = 1; offset = 0; en = 0; reload_val = 4'd9;
    @(negedge clk);
    preset = 0; en = 1;
    begin
      int last, n;
      last = -1; n = 0;
      for (int c = 0; c < 60; c++) begin
        if (zero) begin
          if (last >= 0) begin
            checks++;
            if (c - last != 10) begin failures++; $display("FAIL period %0d", c - last); end
          end
          last = c;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
