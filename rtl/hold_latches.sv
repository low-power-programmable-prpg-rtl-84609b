// hold_latches: the N hold latches placed between the ring generator and
// the phase shifter.
//
// Latch i is transparent while en[i] is 1 (toggle mode: q[i] follows d[i])
// and keeps its last value while en[i] is 0 (hold mode), so a phase-shifter
// XOR fed only by holding latches drives its scan chain with a constant.
// That is the architecture's behaviour. This implementation models each
// latch at the clock-cycle level with a flip-flop and a bypass multiplexer
// (q = en ? d : stored; stored <= q on every update cycle) instead of a
// level-sensitive latch, which keeps the design single-clock and free of
// latch timing; a hold lasts from the cycle en falls until it rises again.
//
// Interface: upd - the stored copy is refreshed this cycle (PRPG stepping
// or First-cycle reload); en - per-latch enable; d - ring generator state;
// q - latch outputs (combinational from en, d and the stored value).
module hold_latches #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         upd,
  input  logic [N-1:0] en,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  logic [N-1:0] stored;

  always_comb q = (en & d) | (~en & stored);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   stored <= '0;
    else if (upd) stored <= q;
  end

endmodule
