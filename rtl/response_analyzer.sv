// response_analyzer: signature register and comparator of the BIST.
//
// An M-bit multiple-input signature register (internal-XOR LFSR with a
// primitive polynomial, lp_prpg_pkg::lfsr_poly) takes one bit from each of
// the M scan chain outputs in every enabled cycle. When check is 1 the
// signature is compared with the good-machine signature: pass = match,
// fail = mismatch (both 0 while check is 0). The role (compare the
// circuit's signature with the good machine's and flag pass or fail)
// follows the architecture; the MISR compaction is this implementation's
// choice. clear (synchronous) resets the signature to 0.
module response_analyzer
  import lp_prpg_pkg::*;
#(
  parameter int unsigned M = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [M-1:0] data,
  input  logic         check,
  input  logic [M-1:0] golden,
  output logic [M-1:0] signature,
  output logic         pass,
  output logic         fail
);

  localparam logic [127:0] POLY = lfsr_poly(M);

  initial assert (lfsr_width_ok(M)) else $error("response_analyzer: no polynomial for M=%0d", M);

  logic [M-1:0] nxt;
  always_comb begin
    logic fb;
    fb = signature[M-1];
    nxt[0] = fb ^ data[0];
    for (int unsigned i = 1; i < M; i++)
      nxt[i] = signature[i-1] ^ (fb & POLY[i]) ^ data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= nxt;
  end

  always_comb begin
    pass = check && (signature == golden);
    fail = check && (signature != golden);
  end

endmodule
