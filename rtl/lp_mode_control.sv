// lp_mode_control: the T flip-flop that alternates hold and toggle periods,
// with its two sources of control.
//
// PRPG mode: a 1 on h (weighted logic H) flips T on the next step.
// Decompressor mode: the 4-bit down counter times each period; when it
// reaches zero T flips and the counter is reloaded from the register of the
// period that starts (Hold register when T goes 1->0, Toggle register when
// 0->1). At the start of every pattern (pat_start) T is set to t_init and
// the counter to offset. t_eff = T OR no_hold: the No Hold code keeps the
// whole pattern in toggle mode. All of this follows the architecture; using
// t_init/offset also in PRPG mode, and the preset having priority over
// stepping, are this implementation's choices.
// T = 1 means toggle mode, T = 0 hold mode. Reset: T = 1, counter 0.
module lp_mode_control
  import lp_prpg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  det_mode,
  input  logic  step,
  input  logic  pat_start,
  input  logic  t_init,
  input  code_t offset,
  input  logic  h,
  input  code_t toggle_reg,
  input  code_t hold_reg,
  input  logic  no_hold,
  output logic  t_q,
  output logic  t_eff,
  output logic  flip,
  output code_t count
);

  logic  cnt_zero;
  code_t reload_val;

  always_comb begin
    reload_val = t_q ? hold_reg : toggle_reg;
    flip       = step && !pat_start && (det_mode ? cnt_zero : h);
    t_eff      = t_q | no_hold;
  end

  down_counter u_cnt (
    .clk        (clk),
    .rst_n      (rst_n),
    .preset     (pat_start),
    .offset     (offset),
    .en         (step && det_mode),
    .reload_val (reload_val),
    .count      (count),
    .zero       (cnt_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         t_q <= 1'b1;
    else if (pat_start) t_q <= t_init;
    else if (flip)      t_q <= ~t_q;
  end

endmodule
