// lp_bist_top: hybrid low-power logic BIST and test-compression system.
//
// One pattern source serves two uses. In PRPG mode (det_mode = 0) it is a
// logic-BIST pseudorandom pattern generator whose scan-shift switching
// activity is programmed by the Switching/Hold/Toggle registers. In
// decompressor mode (det_mode = 1) the same hardware expands compressed
// tester data (ate_in, one word per ate_req cycle) into scan patterns whose
// switching activity is set deterministically per pattern (t_init, offset,
// plus the Hold/Toggle registers). Responses are compacted into a signature
// and compared with the good-machine signature at the end.
//
// Blocks: bist_controller (test controller), lp_decompressor (low-power
// PRPG / LP decompressor), response_analyzer (MISR and comparator). The
// circuit under test is outside: its M scan chains take scan_in and are
// shifted when scan_shift is 1, capture when capture is 1, and return their
// last cells on scan_out.
//
// Timing: scan_in is valid in every scan_shift cycle. ate_in is sampled in
// every ate_req cycle (ring generator initialisation and shift in
// decompressor mode). t_init and offset are sampled when pat_start is 1.
// cfg is written when cfg_we is 1 and should be changed only while no
// pattern is being shifted (e.g. in the capture cycle). pass/fail are valid
// while done is 1. Reset is asynchronous, active low.
module lp_bist_top
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned M           = 64,
  parameter int unsigned N_INJ       = 2,
  parameter int unsigned L           = 100,
  parameter int unsigned INIT_CYCLES = 4,
  parameter int unsigned PAT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // test control
  input  logic             normal_mode,
  input  logic             start,
  input  logic             det_mode,
  input  logic [PAT_W-1:0] num_patterns,
  output logic             test_mode,
  output logic             busy,
  output logic             done,
  output logic [PAT_W-1:0] pattern,
  // programming
  input  logic             cfg_we,
  input  lp_cfg_t          cfg,
  input  logic [N-1:0]     seed,
  // tester side (decompressor mode)
  input  logic [N_INJ-1:0] ate_in,
  output logic             ate_req,
  input  logic             t_init,
  input  code_t            offset,
  output logic             pat_start,
  // scan chains of the circuit under test
  output logic [M-1:0]     scan_in,
  output logic             scan_shift,
  output logic             capture,
  input  logic [M-1:0]     scan_out,
  // response analysis
  input  logic [M-1:0]     golden,
  output logic [M-1:0]     signature,
  output logic             pass,
  output logic             fail,
  // low-power status
  output logic [N-1:0]     latch_en,
  output logic             t_eff,
  output logic             flip,
  output logic             lp_off,
  output logic             no_hold,
  output logic             first_cycle
);

  logic rg_clear, rg_load, rg_step, lp_step, misr_clear, misr_en;

  bist_controller #(.L(L), .INIT_CYCLES(INIT_CYCLES), .PAT_W(PAT_W)) u_ctl (
    .clk (clk), .rst_n (rst_n), .normal_mode (normal_mode), .start (start),
    .det_mode (det_mode), .num_patterns (num_patterns), .test_mode (test_mode),
    .rg_clear (rg_clear), .rg_load (rg_load), .rg_step (rg_step),
    .lp_step (lp_step), .pat_start (pat_start), .first_cycle (first_cycle),
    .scan_shift (scan_shift), .capture (capture), .misr_clear (misr_clear),
    .misr_en (misr_en), .busy (busy), .done (done), .pattern (pattern)
  );

  always_comb ate_req = rg_step && det_mode;

  lp_decompressor #(.N(N), .M(M), .N_INJ(N_INJ)) u_dec (
    .clk (clk), .rst_n (rst_n), .det_mode (det_mode), .cfg_we (cfg_we),
    .cfg (cfg), .seed (seed), .inj (ate_in), .rg_clear (rg_clear),
    .rg_load (rg_load), .rg_step (rg_step), .lp_step (lp_step),
    .pat_start (pat_start), .first_cycle (first_cycle), .t_init (t_init),
    .offset (offset), .scan_in (scan_in), .latch_en (latch_en),
    .t_eff (t_eff), .flip (flip), .lp_off (lp_off), .no_hold (no_hold)
  );

  response_analyzer #(.M(M)) u_ra (
    .clk (clk), .rst_n (rst_n), .clear (misr_clear), .en (misr_en),
    .data (scan_out), .check (done), .golden (golden),
    .signature (signature), .pass (pass), .fail (fail)
  );

endmodule
