// risk_th_tuner: dynamic tuning of the allowed setup-error risk RISK_th.
//
// Two scores estimate, over a sampling interval, what each mode would have
// cost the running program:
//   * an error in write-back (berror) adds N_DEPTH * IPC * weight to the
//     Parallel-mode score (the issue slots a flush would lose) and 1 to the
//     Redundant-mode score (the one-cycle bubble);
//   * an error-free R_mode group adds IPC - 1 to the Redundant-mode score (the
//     parallel issue it gave up).
// IPC is the number of operations in the group. At the end of an interval
// RISK_th moves one STEP down if the Parallel-mode score is higher (favouring
// R_mode) and one STEP up otherwise, and both scores are cleared. RISK_th
// ranges from 0.01 % to 1 %: the step is 0.01 % below 0.1 % and 0.1 % from
// 0.1 % up. RISK_th is kept in 0.01 % units (1..100). rupd pulses in the
// cycle after every update, which starts a new DCF_th division.
//
// An interval ends once its cycle count has passed sample_interval, so it
// lasts sample_interval + 1 cycles (0 disables this), or when the
// decode stage reports the backward branch that closes a hot loop (loop_end),
// so that one interval can be one loop body. With tune_en low the tuner holds
// RISK_th at risk_init, which gives the static scheme with a fixed threshold.
//
// The scoring rule, the comparison, the step sizes and the range follow the
// document. Scoring an error event once per write-back evaluation, the score
// width (saturating), the reset value (risk_init) and the loop_end input as
// the interval marker are this design's choices.
module risk_th_tuner
  import rp_pkg::*;
#(
  parameter int unsigned N_DEPTH = 5,
  parameter int unsigned SCORE_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tune_en,
  input  logic [RISK_W-1:0] risk_init,
  input  logic [15:0]       sample_interval,
  input  logic              loop_end,
  input  logic [3:0]        weight,
  input  logic              ev_valid,
  input  logic              ev_err,
  input  mode_e             ev_mode,
  input  logic              ev_last,
  input  logic [1:0]        ev_ipc,
  output logic [RISK_W-1:0] risk_th,
  output logic              rupd,
  output logic [SCORE_W-1:0] xscore_p,
  output logic [SCORE_W-1:0] xscore_r,
  output logic [31:0]       stat_intervals
);

  logic [15:0]        n;
  logic               iv_end;
  logic [SCORE_W-1:0] inc_p, inc_r;
  logic [SCORE_W-1:0] nxt_p, nxt_r;
  logic [RISK_W-1:0]  risk_init_c;
  logic [RISK_W-1:0]  risk_dn, risk_up;

  function automatic logic [SCORE_W-1:0] sat_add(logic [SCORE_W-1:0] x, logic [SCORE_W-1:0] y);
    logic [SCORE_W:0] s;
    s = {1'b0, x} + {1'b0, y};
    return s[SCORE_W] ? '1 : s[SCORE_W-1:0];
  endfunction

  always_comb begin
    inc_p = '0;
    inc_r = '0;
    if (ev_valid) begin
      if (ev_err) begin
        inc_p = SCORE_W'(N_DEPTH) * SCORE_W'(ev_ipc) * SCORE_W'(weight);
        inc_r = SCORE_W'(1);
      end else if (ev_mode == R_MODE && ev_last && ev_ipc != '0) begin
        inc_r = SCORE_W'(ev_ipc) - SCORE_W'(1);
      end
    end
    nxt_p = sat_add(xscore_p, inc_p);
    nxt_r = sat_add(xscore_r, inc_r);
  end

  assign iv_end = loop_end || (sample_interval != '0 && n >= sample_interval);

  always_comb begin
    risk_init_c = risk_init;
    if (risk_init_c < RISK_MIN) risk_init_c = RISK_MIN;
    if (risk_init_c > RISK_MAX) risk_init_c = RISK_MAX;
    // one step down: 0.1 % steps at and above 0.2 %, 0.01 % steps below
    if (risk_th > RISK_MID)      risk_dn = risk_th - RISK_MID;
    else if (risk_th > RISK_MIN) risk_dn = risk_th - RISK_MIN;
    else                         risk_dn = RISK_MIN;
    // one step up: 0.01 % steps below 0.1 %, 0.1 % steps from 0.1 %
    if (risk_th < RISK_MID)      risk_up = risk_th + RISK_MIN;
    else if (risk_th < RISK_MAX) risk_up = (risk_th + RISK_MID > RISK_MAX) ? RISK_MAX : risk_th + RISK_MID;
    else                         risk_up = RISK_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n              <= '0;
      xscore_p       <= '0;
      xscore_r       <= '0;
      risk_th        <= RISK_MID;
      rupd           <= 1'b0;
      stat_intervals <= '0;
    end else begin
      rupd <= 1'b0;
      if (!tune_en) begin
        n        <= '0;
        xscore_p <= '0;
        xscore_r <= '0;
        if (risk_th != risk_init_c) begin
          risk_th <= risk_init_c;
          rupd    <= 1'b1;
        end
      end else if (iv_end) begin
        n              <= '0;
        xscore_p       <= '0;
        xscore_r       <= '0;
        stat_intervals <= stat_intervals + 1;
        risk_th        <= (nxt_p > nxt_r) ? risk_dn : risk_up;
        rupd           <= 1'b1;
      end else begin
        n        <= n + 16'd1;
        xscore_p <= nxt_p;
        xscore_r <= nxt_r;
      end
    end
  end

  a_risk_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 risk_th >= RISK_MIN && risk_th <= RISK_MAX);

endmodule
