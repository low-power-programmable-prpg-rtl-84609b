// tb_toggle_control_register: reset value, per-pattern reload, AND gating
// by the T state and the force-all override.
module tb_toggle_control_register;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         load, t_eff, force_all;
  logic [N-1:0] sr, ctrl, en, ref_ctrl, exp_en;

  toggle_control_register #(.N(N)) dut (.clk, .rst_n, .load, .sr, .t_eff, .force_all,
                                        .ctrl, .latch_en(en));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; t_eff = 1; force_all = 0; sr = '0; ref_ctrl = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load      = ($urandom_range(0, 9) == 0);
      sr        = N'($urandom);
      t_eff     = 1'($urandom);
      force_all = ($urandom_range(0, 7) == 0);
      #1;
      exp_en = force_all ? '1 : (t_eff ? ref_ctrl : '0);
      checks += 2;
      if (ctrl !== ref_ctrl) begin failures++; $display("FAIL ctrl %h %h", ctrl, ref_ctrl); end
      if (en !== exp_en) begin failures++; $display("FAIL en %h %h", en, exp_en); end
      if (load) ref_ctrl = sr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
