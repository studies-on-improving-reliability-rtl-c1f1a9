// Testbench of risk_th_tuner: random write-back events (modes, errors, group
// sizes), random interval lengths and loop ends, compared each cycle with a
// model of the scoring rule, the score comparison and the two step sizes.
// Directed parts: an error-heavy phase must drive RISK_th down to 0.01 %, a
// clean R_mode phase must drive it up to 1 %, and with tuning disabled it
// must follow risk_init.
module tb_risk_th_tuner;
  import rp_pkg::*;
  localparam int N_DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tune_en = 1'b0;
  logic [RISK_W-1:0] risk_init = 7'd10;
  logic [15:0] sample_interval = '0;
  logic loop_end = 1'b0;
  logic [3:0] weight = 4'd1;
  logic ev_valid = 1'b0, ev_err = 1'b0, ev_last = 1'b0;
  mode_e ev_mode = P_MODE;
  logic [1:0] ev_ipc = '0;
  logic [RISK_W-1:0] risk_th;
  logic rupd;
  logic [23:0] xscore_p, xscore_r;
  logic [31:0] stat_intervals;
  int checks = 0, failures = 0;
  int m_risk, m_p, m_r, m_n, m_iv, m_rupd;
  int seen_min = 0, seen_max = 0;

  risk_th_tuner #(.N_DEPTH(N_DEPTH)) dut (.clk(clk), .rst_n(rst_n), .tune_en(tune_en), .risk_init(risk_init),
    .sample_interval(sample_interval), .loop_end(loop_end), .weight(weight), .ev_valid(ev_valid), .ev_err(ev_err),
    .ev_mode(ev_mode), .ev_last(ev_last), .ev_ipc(ev_ipc), .risk_th(risk_th), .rupd(rupd), .xscore_p(xscore_p),
    .xscore_r(xscore_r), .stat_intervals(stat_intervals));

  function automatic int step_dn(int r);
    if (r > 10) return r - 10;
    if (r > 1) return r - 1;
    return 1;
  endfunction
  function automatic int step_up(int r);
    if (r < 10) return r + 1;
    if (r + 10 > 100) return 100;
    return r + 10;
  endfunction

  // drive one cycle; err_pct and rmode_pct shape the events
  task automatic cyc(input int err_pct, input int rmode_pct, input int loop_pct);
    int ip, ir, np, nr, ri;
    @(negedge clk);
    ev_valid = $urandom_range(0, 9) != 0;
    ev_mode = ($urandom_range(0, 99) < rmode_pct) ? R_MODE : P_MODE;
    ev_err = $urandom_range(0, 99) < err_pct;
    ev_ipc = 2'($urandom_range(1, 3));
    ev_last = $urandom_range(0, 1);
    loop_end = $urandom_range(0, 99) < loop_pct;
    if (risk_th == 1) seen_min++;
    if (risk_th == 100) seen_max++;
    // model of the next state
    ip = 0; ir = 0;
    if (ev_valid) begin
      if (ev_err) begin ip = N_DEPTH * int'(ev_ipc) * int'(weight); ir = 1; end
      else if (ev_mode == R_MODE && ev_last) ir = int'(ev_ipc) - 1;
    end
    np = m_p + ip; nr = m_r + ir;
    ri = (risk_init < 1) ? 1 : (risk_init > 100) ? 100 : int'(risk_init);
    m_rupd = 0;
    if (!tune_en) begin
      m_n = 0; m_p = 0; m_r = 0;
      if (m_risk != ri) begin m_risk = ri; m_rupd = 1; end
    end else if (loop_end || (sample_interval != 0 && m_n >= int'(sample_interval))) begin
      m_n = 0; m_p = 0; m_r = 0; m_iv++; m_rupd = 1;
      m_risk = (np > nr) ? step_dn(m_risk) : step_up(m_risk);
    end else begin
      m_n++; m_p = np; m_r = nr;
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(risk_th) != m_risk || int'(xscore_p) != m_p || int'(xscore_r) != m_r || int'(rupd) != m_rupd ||
        int'(stat_intervals) != m_iv) begin
      failures++;
      $display("FAIL t=%0t risk %0d/%0d p %0d/%0d r %0d/%0d rupd %0d/%0d", $time, risk_th, m_risk, xscore_p, m_p,
               xscore_r, m_r, rupd, m_rupd, m_iv);
    end
  endtask

  initial begin
    m_risk = 10; m_p = 0; m_r = 0; m_n = 0; m_iv = 0; m_rupd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc(0, 0, 0);
    // static mode: follows risk_init (clamped)
    risk_init = 7'd0;
    repeat (3) cyc(0, 0, 0);
    risk_init = 7'd120;
    repeat (3) cyc(0, 0, 0);
    risk_init = 7'd37;
    repeat (3) cyc(0, 0, 0);
    checks++;
    if (risk_th != 37) begin failures++; $display("FAIL static risk"); end
    tune_en = 1'b1;
    // error-heavy P_mode: RISK_th falls to the minimum
    sample_interval = 16'd50;
    repeat (3000) cyc(20, 10, 0);
    checks++;
    if (seen_min == 0) begin failures++; $display("FAIL RISK_th never reached 0.01 %%"); end
    // clean R_mode: RISK_th rises to the maximum
    repeat (3000) cyc(0, 100, 0);
    checks++;
    if (seen_max == 0) begin failures++; $display("FAIL RISK_th never reached 1 %%"); end
    // mixed random with loop ends and random intervals
    for (int k = 0; k < 20; k++) begin
      sample_interval = 16'($urandom_range(0, 200));
      weight = 4'($urandom_range(0, 15));
      repeat (500) cyc($urandom_range(0, 10), $urandom_range(0, 100), 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
