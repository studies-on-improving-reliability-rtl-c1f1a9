// error_rate_sampler: measures ERR_setup, the observed setup-error rate.
//
// Each cycle the write-back stage reports how many operations were checked by
// Razor registers (ops_in, 0..3) and how many of those flagged an error
// (errs_in). The sampler counts both; when WINDOW_OPS operations have been
// checked it publishes the number of errors seen in that window as err_setup
// and pulses upd for one cycle. With the default window of 10000 operations
// err_setup is directly the error rate in 0.01 % units, the unit RISK_th uses,
// so the threshold DCF_th = RISK_th / ERR_setup needs no further scaling.
// The operations of the cycle that completes a window are counted in it.
// Counting errors per sampling period follows the document; the window defined
// in operations, its length and the reset value (no errors) are this design's
// choices.
module error_rate_sampler
  import rp_pkg::*;
#(
  parameter int unsigned WINDOW_OPS = 10000,
  localparam int unsigned CW        = $clog2(WINDOW_OPS + 4)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       ops_in,
  input  logic [1:0]       errs_in,
  output logic [ERR_W-1:0] err_setup,
  output logic             upd
);

  logic [CW-1:0]    op_cnt;
  logic [ERR_W-1:0] err_cnt;
  logic [CW-1:0]    op_next;
  logic [ERR_W-1:0] err_next;

  assign op_next  = op_cnt + CW'(ops_in);
  assign err_next = (err_cnt == '1) ? err_cnt : err_cnt + ERR_W'(errs_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt    <= '0;
      err_cnt   <= '0;
      err_setup <= '0;
      upd       <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (op_next >= CW'(WINDOW_OPS)) begin
        err_setup <= err_next;
        upd       <= 1'b1;
        op_cnt    <= '0;
        err_cnt   <= '0;
      end else begin
        op_cnt  <= op_next;
        err_cnt <= err_next;
      end
    end
  end

  a_errs_le_ops: assert property (@(posedge clk) disable iff (!rst_n) errs_in <= ops_in);

endmodule
