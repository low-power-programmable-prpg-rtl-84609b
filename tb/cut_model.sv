// cut_model: behavioural stand-in for the circuit under test, used only by
// the system testbench. M scan chains of L cells: while scan_shift is 1 each
// chain shifts scan_in[j] into cell 0 and shows cell L-1 on scan_out[j].
// A capture cycle replaces every cell by a small nonlinear function of its
// neighbours: c[j][k] ^ (c[j+1][k] & c[j][k+1]) (indices wrap). fault_en
// models a stuck-at-1 defect on the captured value of chain 0, cell 0.
module cut_model #(
  parameter int M = 64,
  parameter int L = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] scan_in,
  input  logic         scan_shift,
  input  logic         capture,
  input  logic         fault_en,
  output logic [M-1:0] scan_out
);
  logic [L-1:0] c [M];

  always_comb for (int j = 0; j < M; j++) scan_out[j] = c[j][L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < M; j++) c[j] <= '0;
    end else if (scan_shift) begin
      for (int j = 0; j < M; j++) c[j] <= {c[j][L-2:0], scan_in[j]};
    end else if (capture) begin
      for (int j = 0; j < M; j++)
        for (int k = 0; k < L; k++)
          c[j][k] <= c[j][k] ^ (c[(j + 1) % M][k] & c[j][(k + 1) % L]);
      if (fault_en) c[0][0] <= 1'b1;
    end
  end
endmodule
