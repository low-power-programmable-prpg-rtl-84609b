// lp_decompressor: low-power programmable PRPG that doubles as a test data
// decompressor.
//
// Datapath: ring generator -> N hold latches -> phase shifter -> M scan
// chain inputs. Each latch either follows the ring generator (toggle) or
// keeps its value (hold); a scan chain fed only by holding latches shifts a
// constant, so the share of toggling latches sets the scan-shift switching
// activity.
//
// Which latches may toggle in a pattern is given by the toggle control
// register, reloaded once per pattern from a shift register. When and for
// how long they may toggle is given by the T flip-flop: toggle periods
// (T=1) and hold periods (T=0, all latches frozen) alternate.
//
// PRPG mode (det_mode=0, logic BIST): weighted logic V fills the shift
// register with 1s at a rate set by the Switching register; weighted logic
// H, watching the Toggle or Hold register, flips T at random.
// Decompressor mode (det_mode=1): the tester data injected into the ring
// generator is encoded so that everything is deterministic: the shift
// register takes a ring generator stage through its input multiplexer, and
// a down counter, preset per pattern with an offset and then reloaded from
// the Toggle/Hold registers, flips T. Hold = 0000 (No Hold) forces toggle
// mode through an OR gate; Switching = 0000 turns the low-power function
// off (all latches transparent); first_cycle, at the end of ring generator
// initialisation, reloads every latch from the ring generator.
//
// All of the above follows the architecture. Choices of this
// implementation: the deterministic shift-register input is ring generator
// stage N-1; per-pattern t_init/offset also apply in PRPG mode; see the
// sub-modules for the rest.
//
// Timing: sequencing inputs come from bist_controller. rg_step advances the
// ring generator, lp_step advances latches, shift register and T/counter
// (one scan shift cycle), pat_start loads the toggle control register, T and
// the counter for the next pattern. scan_in is valid in every lp_step cycle
// and is shifted into the chains at the same clock edge.
module lp_decompressor
  import lp_prpg_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned M     = 64,
  parameter int unsigned N_INJ = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // mode and programming
  input  logic             det_mode,
  input  logic             cfg_we,
  input  lp_cfg_t          cfg,
  input  logic [N-1:0]     seed,
  // tester channels (decompressor mode)
  input  logic [N_INJ-1:0] inj,
  // sequencing
  input  logic             rg_clear,
  input  logic             rg_load,
  input  logic             rg_step,
  input  logic             lp_step,
  input  logic             pat_start,
  input  logic             first_cycle,
  input  logic             t_init,
  input  code_t            offset,
  // outputs
  output logic [M-1:0]     scan_in,
  output logic [N-1:0]     latch_en,
  output logic             t_eff,
  output logic             flip,
  output logic             lp_off,
  output logic             no_hold
);

  localparam int unsigned DET_TAP = N - 1;

  lp_cfg_t      regs;
  logic [N-1:0] rg;
  logic [N-1:0] lat;
  logic [N-1:0] sr;
  logic         v, h, t_q;

  lp_config_regs u_cfg (
    .clk (clk), .rst_n (rst_n), .we (cfg_we), .cfg (cfg),
    .regs (regs), .lp_off (lp_off), .no_hold (no_hold)
  );

  ring_generator #(.N(N), .N_INJ(N_INJ)) u_rg (
    .clk (clk), .rst_n (rst_n), .clear (rg_clear), .load (rg_load),
    .seed (seed), .step (rg_step), .inj (det_mode ? inj : '0), .state (rg)
  );

  weighted_logic_v #(.N(N)) u_wv (
    .rg (rg), .switching (regs.switching), .v (v)
  );

  weighted_logic_h #(.N(N)) u_wh (
    .rg (rg), .t_state (t_q), .toggle_reg (regs.toggle), .hold_reg (regs.hold), .h (h)
  );

  shift_register #(.N(N)) u_sr (
    .clk (clk), .rst_n (rst_n), .step (lp_step), .det_mode (det_mode),
    .v_in (v), .det_in (rg[DET_TAP]), .sr (sr)
  );

  lp_mode_control u_mode (
    .clk (clk), .rst_n (rst_n), .det_mode (det_mode), .step (lp_step),
    .pat_start (pat_start), .t_init (t_init), .offset (offset), .h (h),
    .toggle_reg (regs.toggle), .hold_reg (regs.hold), .no_hold (no_hold),
    .t_q (t_q), .t_eff (t_eff), .flip (flip), .count ()
  );

  toggle_control_register #(.N(N)) u_tcr (
    .clk (clk), .rst_n (rst_n), .load (pat_start), .sr (sr),
    .t_eff (t_eff), .force_all (first_cycle | lp_off),
    .ctrl (), .latch_en (latch_en)
  );

  hold_latches #(.N(N)) u_lat (
    .clk (clk), .rst_n (rst_n), .upd (lp_step | first_cycle),
    .en (latch_en), .d (rg), .q (lat)
  );

  phase_shifter #(.N(N), .M(M)) u_ps (
    .lat (lat), .scan_in (scan_in)
  );

endmodule
