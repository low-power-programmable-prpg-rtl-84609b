// down_counter: 4-bit binary down counter that times hold and toggle
// periods in decompressor mode.
//
// preset (start of a pattern) loads the offset; afterwards every enabled
// cycle decrements it. When the count is zero, zero is 1 and the next
// enabled cycle loads reload_val (the Toggle or Hold register chosen by the
// caller for the period that follows) instead of decrementing. A count of v
// therefore lasts v+1 cycles. This behaviour follows the architecture; the
// v+1 convention and the preset priority are this implementation's choice.
module down_counter
  import lp_prpg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  preset,
  input  code_t offset,
  input  logic  en,
  input  code_t reload_val,
  output code_t count,
  output logic  zero
);

  always_comb zero = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (preset) count <= offset;
    else if (en)     count <= zero ? reload_val : count - 1'b1;
  end

endmodule
