// End-to-end testbench of razor_protector at its default parameters
// (10000-operation error windows, 256-entry DCF table, 32 registers).
//
// A random VLIW program runs through three phases while a reference model
// checks every register write and the final register file:
//   1. no setup violations: the error windows report zero, the DVS controller
//      steps the supply down and every group runs in P_mode;
//   2. an IR-drop: random setup violations on all lanes; flushes raise
//      ERR_setup, DCF_th falls, critical groups switch to R_mode and their
//      errors are repaired by one-cycle bubbles; the DVS controller steps up;
//   3. the same with RISK_th tuning enabled, with intervals closed both by
//      the interval counter and by loop_end.
// It checks DCF_th = 1000 * RISK_th / ERR_setup whenever the divider has
// settled, and counts each mechanism (flush, bubble, both mode switches,
// R->P wait, R->P lane remap, forwarding, DCF_th update, RISK_th step up and down, voltage
// step up and down, tuning intervals); one that never happened is a failure.
module tb_razor_protector;
  import rp_pkg::*;
  import tb_rp_model_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              bundle_valid = 1'b0;
  slot_t [2:0]       bundle = '0;
  logic              bundle_ready;
  logic              loop_end = 1'b0;
  logic [2:0]        late = '0;
  logic              cfg_tune_en = 1'b0;
  logic [6:0]        cfg_risk_init = 7'd10;
  logic [15:0]       cfg_sample_interval = '0;
  logic [3:0]        cfg_weight = 4'd1;
  logic [15:0]       cfg_err_tol = 16'd5;
  logic [7:0]        cfg_down_step = 8'd10;
  logic [7:0]        cfg_up_step = 8'd20;
  logic [23:0]       cfg_settle_cycles = 24'd200;
  logic [2:0]        wb_we;
  logic [2:0][4:0]   wb_waddr;
  logic [2:0][31:0]  wb_wdata;
  logic [4:0]        dbg_raddr = '0;
  logic [31:0]       dbg_rdata;
  logic [15:0]       err_setup;
  logic [6:0]        risk_th;
  logic [16:0]       dcf_th;
  logic [10:0]       vdd_mv;
  logic              vdd_settling, idle;
  logic [31:0]       stat_ops, stat_r_ops, stat_flush, stat_fix, stat_mode_switch, stat_switch_wait,
                     stat_fwd, stat_intervals, stat_v_up, stat_v_down;

  razor_protector dut (
    .clk(clk), .rst_n(rst_n), .bundle_valid(bundle_valid), .bundle(bundle), .bundle_ready(bundle_ready),
    .loop_end(loop_end), .late(late),
    .lut_we(1'b0), .lut_waddr('0), .lut_wdata('0),
    .cfg_tune_en(cfg_tune_en), .cfg_risk_init(cfg_risk_init), .cfg_sample_interval(cfg_sample_interval),
    .cfg_weight(cfg_weight), .cfg_err_tol(cfg_err_tol), .cfg_down_step(cfg_down_step),
    .cfg_up_step(cfg_up_step), .cfg_settle_cycles(cfg_settle_cycles),
    .wb_we(wb_we), .wb_waddr(wb_waddr), .wb_wdata(wb_wdata), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .err_setup(err_setup), .risk_th(risk_th), .dcf_th(dcf_th), .vdd_mv(vdd_mv), .vdd_settling(vdd_settling),
    .idle(idle), .stat_ops(stat_ops), .stat_r_ops(stat_r_ops), .stat_flush(stat_flush), .stat_fix(stat_fix),
    .stat_mode_switch(stat_mode_switch), .stat_switch_wait(stat_switch_wait), .stat_fwd(stat_fwd),
    .stat_intervals(stat_intervals), .stat_v_up(stat_v_up), .stat_v_down(stat_v_down)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] mregs [32];
  typedef struct packed { logic [4:0] rd; logic [31:0] v; } wr_t;
  wr_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && bundle_valid && bundle_ready) begin
      logic [31:0] res [3];
      for (int s = 0; s < 3; s++)
        if (bundle[s].valid)
          res[s] = ref_op(bundle[s].op, mregs[bundle[s].rs1], mregs[bundle[s].rs2],
                          mregs[bundle[s].rd], bundle[s].imm);
      for (int s = 0; s < 3; s++)
        if (bundle[s].valid) begin
          expq.push_back('{rd: bundle[s].rd, v: res[s]});
          mregs[bundle[s].rd] = res[s];
        end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < 3; l++) begin
        if (wb_we[l]) begin
          if (expq.size() == 0) begin
            check(1'b0, "unexpected register write");
          end else begin
            wr_t e;
            e = expq.pop_front();
            check(e.rd == wb_waddr[l] && e.v == wb_wdata[l],
                  $sformatf("write lane %0d r%0d=%h, expected r%0d=%h", l, wb_waddr[l], wb_wdata[l], e.rd, e.v));
          end
        end
      end
    end
  end

  // Mechanism counters derived from the outputs.
  int n_remap = 0, n_err_upd = 0, n_dcf_upd = 0, n_risk_up = 0, n_risk_dn = 0, n_p2r = 0, n_r2p = 0, n_loop_iv = 0;
  logic [15:0] err_q;
  logic [16:0] dcf_q;
  logic [6:0]  risk_q;
  logic        rmode_q = 1'b0;
  int          th_stable = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      // whenever RISK_th and ERR_setup have held for 40 cycles, DCF_th must
      // be their quotient
      if (err_setup != err_q || risk_th != risk_q) th_stable <= 0;
      else th_stable <= th_stable + 1;
      if (th_stable == 40 && err_setup == err_q && risk_th == risk_q)
        check(dcf_th == ((err_setup == 0) ? 17'h1ffff : 17'((32'(risk_th) * 1000) / 32'(err_setup))),
              $sformatf("settled DCF_th %0d (RISK_th %0d, ERR %0d)", dcf_th, risk_th, err_setup));
      if (err_setup != err_q) n_err_upd++;
      if (dcf_th != dcf_q) n_dcf_upd++;
      if (risk_th > risk_q) n_risk_up++;
      if (risk_th < risk_q) n_risk_dn++;
      if (dut.u_core.do_issue && dut.u_core.iss_pkt.slot != dut.u_core.cand.slot) n_remap++;
      if (dut.u_core.do_issue) begin
        if (dut.u_core.cand.mode == R_MODE && !rmode_q) n_p2r++;
        if (dut.u_core.cand.mode == P_MODE && rmode_q) n_r2p++;
        rmode_q <= (dut.u_core.cand.mode == R_MODE);
      end
    end
    err_q  <= err_setup;
    dcf_q  <= dcf_th;
    risk_q <= risk_th;
  end

  task automatic send(input slot_t g [3]);
    @(negedge clk);
    bundle_valid = 1'b1;
    for (int s = 0; s < 3; s++) bundle[s] = g[s];
    do @(posedge clk); while (!bundle_ready);
  endtask

  task automatic drain();
    @(negedge clk);
    bundle_valid = 1'b0;
    bundle = '0;
    repeat (3) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // DCF_th must equal 1000 * RISK_th / ERR_setup once the divider has settled.
  task automatic check_dcf_th();
    logic [16:0] want;
    repeat (40) @(negedge clk);
    want = (err_setup == 0) ? '1 : 17'((32'(risk_th) * 1000) / 32'(err_setup));
    check(dcf_th == want, $sformatf("DCF_th %0d, expected %0d (RISK_th %0d, ERR %0d)", dcf_th, want, risk_th, err_setup));
  endtask

  int late_pct = 0;
  int v0, v1;
  int ops_before;

  initial begin
    fork
      forever begin
        @(negedge clk);
        for (int l = 0; l < 3; l++) late[l] = ($urandom_range(0, 999) < late_pct);
      end
    join_none
  end

  task automatic run_groups(input int n, input bit loops);
    slot_t g [3];
    for (int i = 0; i < n; i++) begin
      rand_group($urandom_range(1, 3), g);
      send(g);
      if (loops && i % 150 == 149) begin
        @(negedge clk); loop_end = 1'b1;
        @(negedge clk); loop_end = 1'b0;
      end
    end
  endtask

  initial begin
    slot_t g [3];
    for (int r = 0; r < 32; r++) mregs[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 32; r += 3) begin
      for (int s = 0; s < 3; s++) begin
        g[s] = '0;
        if (r + s < 32) begin
          g[s].valid = 1'b1; g[s].op = OP_SETI; g[s].rd = 5'(r + s); g[s].imm = 16'($urandom);
        end
      end
      send(g);
    end

    // ---- phase 1: nominal voltage, no violations
    v0 = int'(vdd_mv);
    run_groups(12000, 1'b0);
    drain();
    check(err_setup == 0, "phase 1: no errors measured");
    check(int'(vdd_mv) < v0, $sformatf("phase 1: supply stepped down (%0d -> %0d mV)", v0, vdd_mv));
    check(stat_r_ops == 0, "phase 1: everything in P_mode");
    check_dcf_th();

    // ---- phase 2: IR-drop, static RISK_th = 0.1 %
    late_pct = 12;
    v1 = int'(vdd_mv);
    run_groups(24000, 1'b0);
    late_pct = 0;
    drain();
    check(err_setup != 0, "phase 2: errors measured");
    check(stat_r_ops != 0, "phase 2: redundant operations ran");
    check(int'(vdd_mv) > v1 || stat_v_up != 0, "phase 2: supply stepped up");
    check_dcf_th();

    // ---- phase 3: IR-drop with RISK_th tuning
    cfg_tune_en = 1'b1;
    cfg_sample_interval = 16'd400;
    cfg_weight = 4'd2;
    late_pct = 12;
    run_groups(20000, 1'b1);
    late_pct = 0;
    run_groups(8000, 1'b1);
    drain();
    cfg_tune_en = 1'b0;
    cfg_risk_init = risk_th;
    check_dcf_th();

    // ---- mechanisms
    check(stat_flush != 0,       "mechanism: P_mode flush and replay");
    check(stat_fix != 0,         "mechanism: R_mode one-cycle bubble");
    check(n_p2r != 0,            "mechanism: switch P_mode -> R_mode");
    check(n_r2p != 0,            "mechanism: switch R_mode -> P_mode");
    check(stat_switch_wait != 0, "mechanism: R->P wait");
    check(n_remap != 0,          "mechanism: R->P lane remap");
    check(stat_fwd != 0,         "mechanism: operand forwarding");
    check(n_err_upd != 0,        "mechanism: ERR_setup update");
    check(n_dcf_upd != 0,        "mechanism: DCF_th recomputation");
    check(n_risk_up != 0,        "mechanism: RISK_th step up");
    check(n_risk_dn != 0,        "mechanism: RISK_th step down");
    check(stat_v_up != 0,        "mechanism: supply step up");
    check(stat_v_down != 0,      "mechanism: supply step down");
    check(stat_intervals != 0,   "mechanism: tuning intervals");

    check(expq.size() == 0, $sformatf("%0d expected writes missing", expq.size()));
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      dbg_raddr = 5'(r);
      #1;
      check(dbg_rdata == mregs[r], $sformatf("final r%0d = %h, expected %h", r, dbg_rdata, mregs[r]));
    end
    $display("cycles=%0d ops=%0d r_ops=%0d flush=%0d fix=%0d switches=%0d (P->R %0d, R->P %0d) waits=%0d remaps=%0d fwd=%0d",
             cyc, stat_ops, stat_r_ops, stat_flush, stat_fix, stat_mode_switch, n_p2r, n_r2p, stat_switch_wait, n_remap, stat_fwd);
    $display("ERR updates=%0d DCF_th updates=%0d RISK up=%0d down=%0d intervals=%0d Vup=%0d Vdown=%0d vdd=%0d risk=%0d",
             n_err_upd, n_dcf_upd, n_risk_up, n_risk_dn, stat_intervals, stat_v_up, stat_v_down, vdd_mv, risk_th);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
