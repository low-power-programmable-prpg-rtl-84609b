// lp_config_regs: the three 4-bit programming registers of the low-power
// PRPG (Switching, Hold, Toggle) and the decoders attached to them.
//
// The registers are written together from cfg when we is 1 (a tester or
// test-access write; the architecture does not say how they are loaded, so
// the parallel write port is this implementation's choice). lp_off is 1
// while Switching holds the code that turns the low-power function off
// (0000), no_hold is 1 while Hold holds the No Hold code (0000), which
// removes hold periods from the pattern. Reset: Switching = 0000 (low power
// off, plain PRPG), Hold = Toggle = 0000.
module lp_config_regs
  import lp_prpg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  lp_cfg_t cfg,
  output lp_cfg_t regs,
  output logic    lp_off,
  output logic    no_hold
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  regs <= '0;
    else if (we) regs <= cfg;
  end

  always_comb begin
    lp_off  = (regs.switching == LP_OFF_CODE);
    no_hold = (regs.hold == NO_HOLD_CODE);
  end

endmodule
