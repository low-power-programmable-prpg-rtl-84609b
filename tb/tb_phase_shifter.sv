// tb_phase_shifter: N=32 latches, M=64 chains. Checks the tap table
// (chain j, j<32: latches j, j+1, j+6 mod 32; j>=32: j-32, j-29, j-21
// mod 32) on random inputs and on every single-bit input, and that a chain
// whose three latches stay constant stays constant while the others change.
module tb_phase_shifter;
  localparam int N = 32, M = 64;
  int checks = 0, failures = 0;
  logic [N-1:0] lat;
  logic [M-1:0] si;

  phase_shifter #(.N(N), .M(M)) dut (.lat, .scan_in(si));

  function automatic logic [M-1:0] expect_ps(logic [N-1:0] l);
    logic [M-1:0] e;
    for (int j = 0; j < M; j++) begin
      int a;
      a = j % 32;
      if (j < 32) e[j] = l[a] ^ l[(a + 1) % 32] ^ l[(a + 6) % 32];
      else        e[j] = l[a] ^ l[(a + 3) % 32] ^ l[(a + 11) % 32];
    end
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      lat = (i < N) ? (N'(1) << i) : N'($urandom);
      #1;
      checks++;
      if (si !== expect_ps(lat)) begin
        failures++;
        $display("FAIL lat=%h got %h exp %h", lat, si, expect_ps(lat));
      end
    end
    // chain 0 uses latches 0,1,6: keep them, randomise the rest
    begin
      logic first;
      lat = N'($urandom);
      #1 first = si[0];
      for (int i = 0; i < 50; i++) begin
        lat = (N'($urandom) & ~N'(32'h43)) | (lat & N'(32'h43));
        #1;
        checks++;
        if (si[0] !== first) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
