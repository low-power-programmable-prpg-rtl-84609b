// toggle_control_register: N-bit register holding, for the current pattern,
// which hold latches may toggle, plus the AND gates that produce the latch
// enables.
//
// The register is reloaded from the shift register once per pattern (load,
// a one-cycle pulse at the start of a pattern). Latch i is enabled when the
// T flip-flop is in the toggle state (t_eff, already ORed with No Hold) and
// ctrl[i] is 1; during a hold period all latches are disabled regardless of
// the register. force_all makes every latch transparent: it is used for the
// First-cycle reload and when the Switching register holds the low-power-off
// code. The gating follows the architecture; the reset value (all ones, every
// latch may toggle) is this implementation's choice.
module toggle_control_register #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] sr,
  input  logic         t_eff,
  input  logic         force_all,
  output logic [N-1:0] ctrl,
  output logic [N-1:0] latch_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ctrl <= '1;
    else if (load) ctrl <= sr;
  end

  always_comb latch_en = (ctrl & {N{t_eff}}) | {N{force_all}};

endmodule
