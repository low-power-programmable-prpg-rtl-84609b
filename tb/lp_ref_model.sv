// lp_ref_model: untimed-style reference of the low-power PRPG /
// decompressor, written for the testbenches only (N = 32, M = 64, two
// tester channels). It keeps the whole state in plain variables and
// advances it in one procedural block per clock, following the behaviour
// described for the design rather than its module structure:
//   ring generator  x^32+x^22+x^2+x+1, internal XOR, channels into 3 and 19
//   latch enable    1 for all when First cycle or Switching = 0000,
//                   else control bit AND (T OR Hold = 0000)
//   shift register  input = weighted V (stages 1..19 odd) or stage 31
//   T / counter     weighted H on stages 0..18 even, or 4-bit down counter
//   phase shifter   chain j: latches j, j+1, j+6 (j<32); j, j+3, j+11 (j>=32)
// Outputs are the expected values of the design's outputs in the same cycle.
module lp_ref_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        det_mode,
  input  logic        cfg_we,
  input  logic [11:0] cfg,
  input  logic [31:0] seed,
  input  logic [1:0]  inj,
  input  logic        rg_clear,
  input  logic        rg_load,
  input  logic        rg_step,
  input  logic        lp_step,
  input  logic        pat_start,
  input  logic        first_cycle,
  input  logic        t_init,
  input  logic [3:0]  offset,
  output logic [63:0] exp_scan_in,
  output logic [31:0] exp_en,
  output logic        exp_t_eff
);
  logic [31:0] rg, held, sr, ctl;
  logic [3:0]  sw, hr, tr, cnt;
  logic        t;

  function automatic logic wgt(logic [31:0] s, int base, logic [3:0] code);
    // gate k ANDs k+1 stages: base, base+2, ... (10 stages in all)
    int idx;
    logic res, g;
    res = 0; idx = 0;
    for (int k = 0; k < 4; k++) begin
      g = 1;
      for (int b = 0; b <= k; b++) begin
        g &= s[base + 2 * idx];
        idx++;
      end
      if (code[k]) res |= g;
    end
    return res;
  endfunction

  logic [31:0] lat;
  always_comb begin
    exp_t_eff = t | (hr == 0);
    for (int i = 0; i < 32; i++)
      exp_en[i] = first_cycle | (sw == 0) | (ctl[i] & exp_t_eff);
    lat = (exp_en & rg) | (~exp_en & held);
    for (int j = 0; j < 64; j++) begin
      int a;
      a = j % 32;
      if (j < 32) exp_scan_in[j] = lat[a] ^ lat[(a + 1) % 32] ^ lat[(a + 6) % 32];
      else        exp_scan_in[j] = lat[a] ^ lat[(a + 3) % 32] ^ lat[(a + 11) % 32];
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg = 0; held = 0; sr = 0; ctl = '1; sw = 0; hr = 0; tr = 0; cnt = 0; t = 1;
    end else begin
      logic [31:0] rg_n;
      logic        fb, h, v, sin, tflip;
      // values seen this cycle
      v   = wgt(rg, 1, sw);
      h   = wgt(rg, 0, t ? tr : hr);
      sin = det_mode ? rg[31] : v;
      // latches
      if (lp_step || first_cycle) held = lat;
      // T and counter
      if (pat_start) begin
        t = t_init; cnt = offset;
      end else if (lp_step) begin
        tflip = det_mode ? (cnt == 0) : h;
        if (det_mode) cnt = (cnt == 0) ? (t ? hr : tr) : cnt - 1;
        if (tflip) t = !t;
      end
      // control register before shift register (it takes the old contents)
      if (pat_start) ctl = sr;
      if (lp_step) sr = {sr[30:0], sin};
      // ring generator
      fb = rg[31];
      rg_n = {rg[30:0], fb} ^ (fb ? 32'h0040_0006 : 32'h0);
      if (det_mode) begin rg_n[3] ^= inj[0]; rg_n[19] ^= inj[1]; end
      if (rg_clear)     rg = 0;
      else if (rg_load) rg = seed;
      else if (rg_step) rg = rg_n;
      if (cfg_we) begin sw = cfg[11:8]; hr = cfg[7:4]; tr = cfg[3:0]; end
    end
  end
endmodule
