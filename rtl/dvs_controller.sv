// dvs_controller: supply-voltage scaling driven by the observed error rate.
//
// At the end of every error-sampling window (upd) it decides one step for the
// voltage code sent to the regulator:
//   * no errors in the window: scale down by down_step;
//   * errors, but at most err_tol: keep the voltage;
//   * more than err_tol errors: scale up by up_step.
// The code is in millivolts and stays between VMIN_MV and VMAX_MV (0.8 V to
// 1.3 V as in the evaluation). After each change the controller waits
// settle_cycles cycles, the time the regulator needs for that step at its
// scaling slope, and ignores windows that end meanwhile; settling is high
// during the wait. The three-way rule and the voltage range follow the
// document; the millivolt code, the step inputs, the settle wait and the start
// voltage (VMAX_MV) are this design's choices.
module dvs_controller
  import rp_pkg::*;
#(
  parameter int unsigned VMIN_MV = 800,
  parameter int unsigned VMAX_MV = 1300
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,
  input  logic [ERR_W-1:0] err_setup,
  input  logic [ERR_W-1:0] err_tol,
  input  logic [7:0]       down_step,
  input  logic [7:0]       up_step,
  input  logic [23:0]      settle_cycles,
  output logic [10:0]      vdd_mv,
  output logic             settling,
  output logic [31:0]      stat_up,
  output logic [31:0]      stat_down
);

  logic [23:0] wait_cnt;
  logic [11:0] v_dn, v_up;

  assign settling = (wait_cnt != '0);
  assign v_dn = ({1'b0, vdd_mv} < 12'(VMIN_MV) + 12'(down_step)) ? 12'(VMIN_MV) : {1'b0, vdd_mv} - 12'(down_step);
  assign v_up = ({1'b0, vdd_mv} + 12'(up_step) > 12'(VMAX_MV))   ? 12'(VMAX_MV) : {1'b0, vdd_mv} + 12'(up_step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd_mv    <= 11'(VMAX_MV);
      wait_cnt  <= '0;
      stat_up   <= '0;
      stat_down <= '0;
    end else begin
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      if (upd && !settling) begin
        if (err_setup == '0) begin
          if (v_dn[10:0] != vdd_mv) begin
            vdd_mv    <= v_dn[10:0];
            wait_cnt  <= settle_cycles;
            stat_down <= stat_down + 1;
          end
        end else if (err_setup > err_tol) begin
          if (v_up[10:0] != vdd_mv) begin
            vdd_mv   <= v_up[10:0];
            wait_cnt <= settle_cycles;
            stat_up  <= stat_up + 1;
          end
        end
      end
    end
  end

  a_range: assert property (@(posedge clk) disable iff (!rst_n)
                            vdd_mv >= 11'(VMIN_MV) && vdd_mv <= 11'(VMAX_MV));

endmodule
