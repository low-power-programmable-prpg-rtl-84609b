// tb_response_analyzer: M=16 signature register against a reference MISR
// with polynomial x^16+x^15+x^13+x^4+1 (internal XOR, data bit i into
// stage i); comparator pass/fail against the signature of the error-free
// stream, with and without a single-bit error injected into the data.
module tb_response_analyzer;
  localparam int M = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         clear, en, check, pass, fail;
  logic [M-1:0] data, golden, sig, ref_sig, good_sig, clean;

  response_analyzer #(.M(M)) dut (.clk, .rst_n, .clear, .en, .data, .check, .golden,
                                  .signature(sig), .pass, .fail);

  function automatic logic [M-1:0] misr(logic [M-1:0] s, logic [M-1:0] d);
    logic [M-1:0] n;
    n = {s[M-2:0], s[M-1]};
    if (s[M-1]) begin n[15] ^= 1'b1; n[13] ^= 1'b1; n[4] ^= 1'b1; end
    return n ^ d;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0; check = 0; data = 0; golden = 0; ref_sig = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int err_at;
      err_at = (run % 2 == 1) ? int'($urandom_range(0, 199)) : -1;
      @(negedge clk);
      clear = 1; check = 0; ref_sig = 0; good_sig = 0;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < 200; i++) begin
        en    = (i == err_at) || ($urandom_range(0, 5) != 0);
        clean = M'($urandom);
        data  = (i == err_at) ? clean ^ 16'h0100 : clean;
        if (en) begin
          ref_sig  = misr(ref_sig, data);
          good_sig = misr(good_sig, clean);
        end
        @(negedge clk);
        checks++;
        if (sig !== ref_sig) begin failures++; $display("FAIL sig %h %h", sig, ref_sig); end
      end
      en = 0;
      golden = good_sig;
      check = 0;
      #1 checks++;
      if (pass || fail) begin failures++; $display("FAIL flags without check"); end
      check = 1;
      #1 checks++;
      if (pass !== (err_at < 0) || fail !== (err_at >= 0)) begin
        failures++; $display("FAIL compare pass=%b fail=%b", pass, fail);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
