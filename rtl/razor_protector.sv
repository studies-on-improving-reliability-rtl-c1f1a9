// razor_protector: execution cluster with adaptive redundancy against
// setup errors under aggressive voltage scaling.
//
// The cluster runs VLIW groups of up to three operations on three pipelines
// whose EX registers are Razor flip-flops (rp_core). Operations whose delay
// criticality (DCF) is high relative to the current error rate are executed
// redundantly: the primary pipeline computes them in one cycle and an R-PIPE
// repeats them over two cycles, so a setup error costs one bubble instead of a
// pipeline flush. The redundancy level adapts at run time:
//
//   error_rate_sampler  Razor errors per 10000 checked operations -> ERR_setup
//   risk_th_tuner       scores both modes per interval -> RISK_th
//   dcf_th_calc         DCF_th = RISK_th / ERR_setup (shift-and-subtract)
//   rp_core/rp_mapper   group DCF > DCF_th  ->  R_mode, else P_mode
//   dvs_controller      ERR_setup -> supply voltage code for the regulator
//
// The regulator and the processor front end (fetch, decode, memory system)
// are outside this block: groups arrive on bundle/bundle_valid, loop_end comes
// from the branch decoder, vdd_mv goes to the regulator, and the effect of the
// supply on timing comes back as late[2:0] (see razor_ff).
// cfg_* inputs are quasi-static settings: DCF table writes (lut_*), the
// initial or static RISK_th, tuning enable, interval length, the P_mode score
// weight, and the DVS rule's tolerance, steps and settle time.
// Parameters: DATA_W data width, NUM_GR registers, N_DEPTH flush penalty in
// cycles, DCF_ENTRIES table size, WINDOW_OPS error-sampling window.
module razor_protector
  import rp_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NUM_GR      = 32,
  parameter int unsigned N_DEPTH     = 5,
  parameter int unsigned DCF_ENTRIES = 256,
  parameter int unsigned WINDOW_OPS  = 10000,
  localparam int unsigned GA         = $clog2(NUM_GR)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // instruction groups from the front end
  input  logic                           bundle_valid,
  input  slot_t [LANES-1:0]              bundle,
  output logic                           bundle_ready,
  input  logic                           loop_end,
  // setup violations per lane caused by the present supply voltage
  input  logic [LANES-1:0]               late,
  // configuration
  input  logic                           lut_we,
  input  logic [$clog2(DCF_ENTRIES)-1:0] lut_waddr,
  input  logic [DCF_W-1:0]               lut_wdata,
  input  logic                           cfg_tune_en,
  input  logic [RISK_W-1:0]              cfg_risk_init,
  input  logic [15:0]                    cfg_sample_interval,
  input  logic [3:0]                     cfg_weight,
  input  logic [ERR_W-1:0]               cfg_err_tol,
  input  logic [7:0]                     cfg_down_step,
  input  logic [7:0]                     cfg_up_step,
  input  logic [23:0]                    cfg_settle_cycles,
  // register writes and observation port
  output logic [LANES-1:0]               wb_we,
  output logic [LANES-1:0][GA-1:0]       wb_waddr,
  output logic [LANES-1:0][DATA_W-1:0]   wb_wdata,
  input  logic [GA-1:0]                  dbg_raddr,
  output logic [DATA_W-1:0]              dbg_rdata,
  // controller state
  output logic [ERR_W-1:0]               err_setup,
  output logic [RISK_W-1:0]              risk_th,
  output logic [DCF_TH_W-1:0]            dcf_th,
  output logic [10:0]                    vdd_mv,
  output logic                           vdd_settling,
  output logic                           idle,
  // event counters
  output logic [31:0]                    stat_ops,
  output logic [31:0]                    stat_r_ops,
  output logic [31:0]                    stat_flush,
  output logic [31:0]                    stat_fix,
  output logic [31:0]                    stat_mode_switch,
  output logic [31:0]                    stat_switch_wait,
  output logic [31:0]                    stat_fwd,
  output logic [31:0]                    stat_intervals,
  output logic [31:0]                    stat_v_up,
  output logic [31:0]                    stat_v_down
);

  logic [1:0]  chk_ops, chk_errs;
  logic        ev_valid, ev_err, ev_last;
  mode_e       ev_mode;
  logic [1:0]  ev_ipc;
  logic        err_upd, risk_upd, div_busy;
  logic [23:0] xscore_p, xscore_r;

  rp_core #(
    .DATA_W(DATA_W), .NUM_GR(NUM_GR), .N_DEPTH(N_DEPTH), .DCF_ENTRIES(DCF_ENTRIES)
  ) u_core (
    .clk(clk), .rst_n(rst_n),
    .bundle_valid(bundle_valid), .bundle(bundle), .bundle_ready(bundle_ready),
    .late(late), .dcf_th(dcf_th),
    .lut_we(lut_we), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .wb_we(wb_we), .wb_waddr(wb_waddr), .wb_wdata(wb_wdata),
    .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .chk_ops(chk_ops), .chk_errs(chk_errs),
    .ev_valid(ev_valid), .ev_err(ev_err), .ev_mode(ev_mode), .ev_last(ev_last), .ev_ipc(ev_ipc),
    .idle(idle),
    .stat_ops(stat_ops), .stat_r_ops(stat_r_ops), .stat_flush(stat_flush), .stat_fix(stat_fix),
    .stat_mode_switch(stat_mode_switch), .stat_switch_wait(stat_switch_wait), .stat_fwd(stat_fwd)
  );

  error_rate_sampler #(.WINDOW_OPS(WINDOW_OPS)) u_sampler (
    .clk(clk), .rst_n(rst_n), .ops_in(chk_ops), .errs_in(chk_errs),
    .err_setup(err_setup), .upd(err_upd)
  );

  risk_th_tuner #(.N_DEPTH(N_DEPTH)) u_tuner (
    .clk(clk), .rst_n(rst_n), .tune_en(cfg_tune_en), .risk_init(cfg_risk_init),
    .sample_interval(cfg_sample_interval), .loop_end(loop_end), .weight(cfg_weight),
    .ev_valid(ev_valid), .ev_err(ev_err), .ev_mode(ev_mode), .ev_last(ev_last), .ev_ipc(ev_ipc),
    .risk_th(risk_th), .rupd(risk_upd), .xscore_p(xscore_p), .xscore_r(xscore_r),
    .stat_intervals(stat_intervals)
  );

  dcf_th_calc u_dcf_th (
    .clk(clk), .rst_n(rst_n), .start(err_upd || risk_upd),
    .risk_th(risk_th), .err_setup(err_setup), .dcf_th(dcf_th), .busy(div_busy)
  );

  dvs_controller u_dvs (
    .clk(clk), .rst_n(rst_n), .upd(err_upd), .err_setup(err_setup),
    .err_tol(cfg_err_tol), .down_step(cfg_down_step), .up_step(cfg_up_step),
    .settle_cycles(cfg_settle_cycles), .vdd_mv(vdd_mv), .settling(vdd_settling),
    .stat_up(stat_v_up), .stat_down(stat_v_down)
  );

endmodule
