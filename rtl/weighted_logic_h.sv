// weighted_logic_h: pseudorandom input of the T flip-flop in PRPG mode.
//
// The T flip-flop state selects which register is watched: the Toggle
// register during a toggle period, the Hold register during a hold period.
// The selected 4-bit code weights the same AND/OR structure as weighted
// logic V (gate k gives 1 with probability 2^-(k+1)), fed from a disjoint
// set of ring generator stages (lp_prpg_pkg::h_tap). A 1 on h ends the
// current period. Larger codes therefore mean shorter periods. The
// selection by the T state follows the architecture; the weighting scheme
// mirrors weighted logic V and is this implementation's choice.
// Purely combinational.
module weighted_logic_h
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] rg,
  input  logic         t_state,
  input  code_t        toggle_reg,
  input  code_t        hold_reg,
  output logic         h
);

  initial assert (N >= 2 * WL_BITS) else $error("weighted_logic_h: N too small");

  logic [WL_BITS-1:0] r;
  code_t              sel;
  always_comb begin
    for (int unsigned k = 0; k < WL_BITS; k++) r[k] = rg[h_tap(k, N)];
    sel = t_state ? toggle_reg : hold_reg;
    h   = weighted(r, sel);
  end

endmodule
