// phase_shifter: XOR network that spreads the N hold-latch outputs over M
// scan chains.
//
// Scan chain j receives the XOR of three latch outputs chosen by
// lp_prpg_pkg::ps_tap (j mod N, plus two offsets that grow with j div N, so
// that chains j and j+N use different triples). A chain whose three latches
// are all in hold mode receives a constant, which is what gives the scan
// chain its low-power behaviour. The architecture gives the role of the
// phase shifter; the tap formula is this implementation's own (a real flow
// would synthesise taps for a minimum channel separation).
// Purely combinational.
module phase_shifter
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 64
) (
  input  logic [N-1:0] lat,
  output logic [M-1:0] scan_in
);

  initial assert (N >= 12) else $error("phase_shifter: N too small for distinct taps");

  always_comb begin
    for (int unsigned j = 0; j < M; j++)
      scan_in[j] = lat[ps_tap(j, 0, N)] ^ lat[ps_tap(j, 1, N)] ^ lat[ps_tap(j, 2, N)];
  end

endmodule
