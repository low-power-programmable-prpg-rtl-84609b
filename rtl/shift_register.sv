// shift_register: the additional N-bit shift register that prepares the
// next pattern's latch-enable map.
//
// Every PRPG step one bit enters at stage 0 and the contents move one stage
// up. A multiplexer in front of the input chooses the source: the
// probabilistic output of weighted logic V in PRPG (logic BIST) mode, or a
// deterministic bit in decompressor mode, so that the toggle control register
// can be encoded from tester data. Both the register and the multiplexer are
// from the architecture; taking the deterministic bit from a ring generator
// stage (done in lp_decompressor) is this implementation's choice.
//
// Interface (synchronous): step shifts; det_mode selects det_in over v_in;
// sr is the registered contents, sr[0] the newest bit.
module shift_register #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         det_mode,
  input  logic         v_in,
  input  logic         det_in,
  output logic [N-1:0] sr
);

  logic sin;
  always_comb sin = det_mode ? det_in : v_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (step) sr <= {sr[N-2:0], sin};
  end

endmodule
