// tb_lp_config_regs: reset values, writes only with we, and the two code
// decoders (Switching = 0000 -> lp_off, Hold = 0000 -> no_hold).
module tb_lp_config_regs;
  import lp_prpg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    we, lp_off, no_hold;
  lp_cfg_t cfg, regs, ref_regs;

  lp_config_regs dut (.clk, .rst_n, .we, .cfg, .regs, .lp_off, .no_hold);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cfg = '0; ref_regs = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks += 3;
      if (regs !== ref_regs) begin failures++; $display("FAIL regs %h %h", regs, ref_regs); end
      if (lp_off !== (ref_regs.switching == 4'd0)) begin failures++; $display("FAIL lp_off"); end
      if (no_hold !== (ref_regs.hold == 4'd0)) begin failures++; $display("FAIL no_hold"); end
      we  = ($urandom_range(0, 2) == 0);
      cfg = 12'($urandom);
      if ($urandom_range(0, 3) == 0) cfg.switching = '0;
      if ($urandom_range(0, 3) == 0) cfg.hold = '0;
      if (we) ref_regs = cfg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
