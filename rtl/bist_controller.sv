// bist_controller: test controller of the low-power BIST / decompressor.
//
// normal_mode = 1 keeps the circuit in functional (normal) mode: the
// controller stays idle and drives no test signal. With normal_mode = 0 a
// start pulse runs num_patterns patterns and ends in DONE, where the
// response analyzer compares the signature.
//
// PRPG mode (det_mode = 0):
//   SEED (load ring generator seed) -> { PRE (pattern start; First cycle on
//   the first pattern) -> SHIFT x L -> CAPTURE } x num_patterns -> UNLOAD x L
// Decompressor mode (det_mode = 1), per pattern:
//   CLEAR (ring generator <= 0) -> INIT x INIT_CYCLES (tester data injected;
//   the last INIT cycle is the pattern start and the First cycle) ->
//   SHIFT x L -> CAPTURE; after the last pattern UNLOAD x L.
// Total cycles from start to DONE: PRPG 1 + P*(L+2) + L,
// decompressor P*(INIT_CYCLES+L+2) + L.
//
// The controller's role (test/normal mode, controlling all other blocks)
// and the First cycle at the end of ring generator initialisation follow
// the architecture; the state sequence, the single capture cycle, the
// final unload and the per-pattern decompressor initialisation are this
// implementation's choices.
module bist_controller #(
  parameter int unsigned L           = 100,
  parameter int unsigned INIT_CYCLES = 4,
  parameter int unsigned PAT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             normal_mode,
  input  logic             start,
  input  logic             det_mode,
  input  logic [PAT_W-1:0] num_patterns,
  output logic             test_mode,
  output logic             rg_clear,
  output logic             rg_load,
  output logic             rg_step,
  output logic             lp_step,
  output logic             pat_start,
  output logic             first_cycle,
  output logic             scan_shift,
  output logic             capture,
  output logic             misr_clear,
  output logic             misr_en,
  output logic             busy,
  output logic             done,
  output logic [PAT_W-1:0] pattern
);

  typedef enum logic [3:0] {
    S_IDLE, S_SEED, S_PRE, S_CLEAR, S_INIT, S_SHIFT, S_CAPTURE, S_UNLOAD, S_DONE
  } state_t;

  localparam int unsigned CNT_W = $clog2((L > INIT_CYCLES ? L : INIT_CYCLES) + 1);

  initial begin
    assert (L >= 1) else $error("bist_controller: L must be >= 1");
    assert (INIT_CYCLES >= 1) else $error("bist_controller: INIT_CYCLES must be >= 1");
  end

  state_t           state, state_nxt;
  logic [CNT_W-1:0] cnt;
  logic             run_det;   // mode latched at start
  logic             go;
  logic             last_cnt_shift, last_cnt_init, last_pat;

  always_comb begin
    go             = start && !normal_mode && (num_patterns != '0);
    last_cnt_shift = (cnt == CNT_W'(L - 1));
    last_cnt_init  = (cnt == CNT_W'(INIT_CYCLES - 1));
    last_pat       = (pattern == num_patterns - 1'b1);
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      S_IDLE, S_DONE: if (go) state_nxt = det_mode ? S_CLEAR : S_SEED;
      S_SEED:         state_nxt = S_PRE;
      S_PRE:          state_nxt = S_SHIFT;
      S_CLEAR:        state_nxt = S_INIT;
      S_INIT:         if (last_cnt_init) state_nxt = S_SHIFT;
      S_SHIFT:        if (last_cnt_shift) state_nxt = S_CAPTURE;
      S_CAPTURE:      state_nxt = last_pat ? S_UNLOAD : (run_det ? S_CLEAR : S_PRE);
      S_UNLOAD:       if (last_cnt_shift) state_nxt = S_DONE;
      default:        state_nxt = S_IDLE;
    endcase
    if (normal_mode) state_nxt = S_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      pattern <= '0;
      run_det <= 1'b0;
    end else begin
      state <= state_nxt;
      if (state_nxt != state) cnt <= '0;
      else                    cnt <= cnt + 1'b1;
      if ((state == S_IDLE || state == S_DONE) && go) begin
        pattern <= '0;
        run_det <= det_mode;
      end else if (state == S_CAPTURE && !last_pat) begin
        pattern <= pattern + 1'b1;
      end
    end
  end

  always_comb begin
    test_mode   = !normal_mode;
    rg_clear    = (state == S_CLEAR);
    rg_load     = (state == S_SEED);
    rg_step     = (state == S_INIT) || (state == S_SHIFT) || (state == S_UNLOAD);
    lp_step     = (state == S_SHIFT) || (state == S_UNLOAD);
    scan_shift  = lp_step;
    misr_en     = lp_step;
    capture     = (state == S_CAPTURE);
    pat_start   = (state == S_PRE) || (state == S_INIT && last_cnt_init);
    first_cycle = (state == S_PRE && pattern == '0) || (state == S_INIT && last_cnt_init);
    misr_clear  = (state == S_IDLE || state == S_DONE) && go;
    busy        = (state != S_IDLE) && (state != S_DONE);
    done        = (state == S_DONE);
  end

endmodule
