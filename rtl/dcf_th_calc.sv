// dcf_th_calc: DCF threshold calculation unit, DCF_th = RISK_th / ERR_setup.
//
// The threshold is recomputed whenever RISK_th or ERR_setup changes (start).
// With RISK_th in 0.01 % units and ERR_setup in errors per 10000 operations
// the quotient is a pure ratio; it is scaled by 1000 so that DCF_th comes out
// in the 0.1 % units of the DCF table: DCF_th = 1000 * RISK_th / ERR_setup.
// The division is done with additions and shifts only, by a restoring
// shift-and-subtract divider producing one quotient bit per cycle (DCF_TH_W
// cycles). This is slow but, as the threshold only changes once per sampling
// interval, the delay does not matter. While the divider works the previous
// threshold stays in use. A start that arrives while busy is remembered and
// served when the current division ends. With no errors seen (ERR_setup = 0)
// the threshold is the largest value, so no operation is made redundant.
// Dividing with shifts and additions follows the document; the bit-serial
// structure, the scaling and the zero rule are this design's choices.
module dcf_th_calc
  import rp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [RISK_W-1:0]   risk_th,
  input  logic [ERR_W-1:0]    err_setup,
  output logic [DCF_TH_W-1:0] dcf_th,
  output logic                busy
);

  localparam int unsigned NW = DCF_TH_W;
  localparam int unsigned CNT_W = $clog2(NW + 1);

  logic                pending;
  logic [NW-1:0]       num;     // dividend, shifted out MSB first
  logic [NW-1:0]       quo;
  logic [ERR_W:0]      rem;
  logic [ERR_W-1:0]    den;
  logic [CNT_W-1:0]    cnt;
  logic [ERR_W:0]      rem_sh;
  logic                go;

  assign go     = (start || pending) && !busy;
  assign rem_sh = {rem[ERR_W-1:0], num[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      busy    <= 1'b0;
      num     <= '0;
      quo     <= '0;
      rem     <= '0;
      den     <= '0;
      cnt     <= '0;
      dcf_th  <= '1;
    end else begin
      if (start && busy) pending <= 1'b1;
      if (go) begin
        pending <= 1'b0;
        if (err_setup == '0) begin
          dcf_th <= '1;
        end else begin
          busy <= 1'b1;
          num  <= NW'(risk_th) * NW'(1000);
          den  <= err_setup;
          rem  <= '0;
          quo  <= '0;
          cnt  <= CNT_W'(NW);
        end
      end else if (busy) begin
        if (rem_sh >= {1'b0, den}) begin
          rem <= rem_sh - {1'b0, den};
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[NW-2:0], 1'b0};
        end
        num <= {num[NW-2:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy   <= 1'b0;
          dcf_th <= (rem_sh >= {1'b0, den}) ? {quo[NW-2:0], 1'b1} : {quo[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
