// weighted_logic_v: source of the latch-enable bits shifted into the shift
// register in PRPG mode.
//
// Four AND gates combine 1, 2, 3 and 4 ring generator bits, so their outputs
// are 1 with probability 1/2, 1/4, 1/8 and 1/16. Switching register bit k
// enables gate k and an OR gate merges the enabled gates, so the 15 non-zero
// codes give 15 programmable fractions of toggling latches (code 0000 is the
// low-power-off code and is decoded in lp_config_regs). Gates with weights
// that are powers of two and an OR gate follow the architecture; the exact
// bit-to-weight assignment and the ring generator stages used
// (lp_prpg_pkg::v_tap) are this implementation's choice.
// Purely combinational; in decompressor mode its output is ignored.
module weighted_logic_v
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] rg,
  input  code_t        switching,
  output logic         v
);

  initial assert (N >= 2 * WL_BITS) else $error("weighted_logic_v: N too small");

  logic [WL_BITS-1:0] r;
  always_comb begin
    for (int unsigned k = 0; k < WL_BITS; k++) r[k] = rg[v_tap(k, N)];
    v = weighted(r, switching);
  end

endmodule
