// tb_shift_register: random step / mode / data for 1000 cycles; the
// register must equal a reference shift of the multiplexer-selected bit.
module tb_shift_register;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         step, det_mode, v_in, det_in;
  logic [N-1:0] sr, ref_sr;

  shift_register #(.N(N)) dut (.clk, .rst_n, .step, .det_mode, .v_in, .det_in, .sr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0; det_mode = 0; v_in = 0; det_in = 0; ref_sr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (sr !== ref_sr) begin failures++; $display("FAIL cycle %0d %h %h", i, sr, ref_sr); end
      step     = ($urandom_range(0, 3) != 0);
      det_mode = (i >= 500);
      v_in     = 1'($urandom);
      det_in   = 1'($urandom);
      if (step) ref_sr = {ref_sr[N-2:0], det_mode ? det_in : v_in};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
