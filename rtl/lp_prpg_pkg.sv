// lp_prpg_pkg: types, constants and tap-selection functions shared by the
// low-power PRPG / LP decompressor and its BIST wrapper.
//
// The 4-bit code width of the Switching, Hold and Toggle registers follows
// the architecture description. Everything else here is a choice of this
// implementation: the feedback polynomials (primitive trinomials/pentanomials
// from the standard maximal-length LFSR tables), the ring generator stages
// that feed the two weighted-logic blocks, the injector positions and the
// phase-shifter tap formula.
package lp_prpg_pkg;

  localparam int unsigned CODE_W = 4;
  typedef logic [CODE_W-1:0] code_t;

  // Code that switches the low-power function off (Switching register) and
  // code that disables the hold phase (Hold register).
  localparam code_t LP_OFF_CODE  = 4'b0000;
  localparam code_t NO_HOLD_CODE = 4'b0000;

  // Programmable low-power settings.
  typedef struct packed {
    code_t switching;
    code_t hold;
    code_t toggle;
  } lp_cfg_t;

  // Number of ring generator bits consumed by one weighted-logic block:
  // AND gates of 1, 2, 3 and 4 inputs give 1 with probability 1/2, 1/4,
  // 1/8 and 1/16.
  localparam int unsigned WL_BITS = 10;

  // Feedback polynomial of a maximal-length linear register of width w.
  // Bit i set means the x^i term (0 < i < w) is present; x^w and x^0 are
  // implied. Unsupported widths return 0 and are rejected by assertions.
  function automatic logic [127:0] lfsr_poly(int unsigned w);
    logic [127:0] p;
    p = '0;
    case (w)
      8:   begin p[6]  = 1'b1; p[5]  = 1'b1; p[4]  = 1'b1; end
      16:  begin p[15] = 1'b1; p[13] = 1'b1; p[4]  = 1'b1; end
      24:  begin p[23] = 1'b1; p[22] = 1'b1; p[17] = 1'b1; end
      32:  begin p[22] = 1'b1; p[2]  = 1'b1; p[1]  = 1'b1; end
      48:  begin p[47] = 1'b1; p[21] = 1'b1; p[20] = 1'b1; end
      64:  begin p[63] = 1'b1; p[61] = 1'b1; p[60] = 1'b1; end
      96:  begin p[94] = 1'b1; p[49] = 1'b1; p[47] = 1'b1; end
      128: begin p[126] = 1'b1; p[101] = 1'b1; p[99] = 1'b1; end
      default: p = '0;
    endcase
    return p;
  endfunction

  function automatic bit lfsr_width_ok(int unsigned w);
    return w inside {8, 16, 24, 32, 48, 64, 96, 128};
  endfunction

  // Ring generator stage read by input k (0..9) of weighted logic V / H.
  function automatic int unsigned v_tap(int unsigned k, int unsigned n);
    return (2 * k + 1) % n;
  endfunction
  function automatic int unsigned h_tap(int unsigned k, int unsigned n);
    return (2 * k) % n;
  endfunction

  // Ring generator stage that receives tester channel c.
  function automatic int unsigned inj_tap(int unsigned c, int unsigned n_inj, int unsigned n);
    return (c * (n / n_inj) + 3) % n;
  endfunction

  // Phase shifter: scan chain j is the XOR of three latch outputs.
  function automatic int unsigned ps_tap(int unsigned j, int unsigned t, int unsigned n);
    int unsigned a, q;
    a = j % n;
    q = j / n;
    case (t)
      0:       return a;
      1:       return (a + 1 + 2 * q) % n;
      default: return (a + 6 + 5 * q) % n;
    endcase
  endfunction

  // Weighted logic: AND gates of 1..4 ring generator bits, each enabled by
  // one code bit, combined by an OR gate. Code bit k selects the gate whose
  // output is 1 with probability 2^-(k+1).
  function automatic logic weighted(logic [WL_BITS-1:0] r, code_t code);
    logic [3:0] g;
    g[0] = r[0];
    g[1] = &r[2:1];
    g[2] = &r[5:3];
    g[3] = &r[9:6];
    return |(g & code);
  endfunction

endpackage
