// ring_generator: N-bit linear pseudorandom source of the low-power PRPG.
//
// A ring of N flip-flops closed through stage N-1 -> stage 0, with XOR
// feedback injections at the stages given by a primitive polynomial
// (internal-XOR form), so that the free-running sequence has the maximal
// period 2^N-1. In decompressor mode N_INJ tester channels are XORed into
// fixed stages every step, as in a continuous-flow decompressor; in PRPG
// mode the channels are held at 0 and the register runs from its seed.
// The architecture only asks for "an n-bit ring generator or LFSR"; the
// internal-XOR structure, the polynomial and the injector positions are
// choices of this implementation (see lp_prpg_pkg).
//
// Interface / timing (all synchronous to clk, priority clear > load > step):
//   clear     - state <= 0 (start of decompressor initialisation)
//   load      - state <= seed (PRPG seed)
//   step      - advance one step, XORing inj[c] into stage inj_tap(c)
//   state     - current register contents (registered output)
module ring_generator
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned N_INJ = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             load,
  input  logic [N-1:0]     seed,
  input  logic             step,
  input  logic [N_INJ-1:0] inj,
  output logic [N-1:0]     state
);

  localparam logic [127:0] POLY = lfsr_poly(N);

  initial begin
    assert (lfsr_width_ok(N)) else $error("ring_generator: no polynomial for N=%0d", N);
    assert (N_INJ >= 1 && N_INJ <= N) else $error("ring_generator: bad N_INJ");
  end

  logic [N-1:0] nxt;

  always_comb begin
    logic fb;
    fb = state[N-1];
    nxt[0] = fb;
    for (int unsigned i = 1; i < N; i++)
      nxt[i] = state[i-1] ^ (fb & POLY[i]);
    for (int unsigned c = 0; c < N_INJ; c++)
      nxt[inj_tap(c, N_INJ, N)] ^= inj[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= '0;
    else if (clear)  state <= '0;
    else if (load)   state <= seed;
    else if (step)   state <= nxt;
  end

endmodule
