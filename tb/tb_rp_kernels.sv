// Kernel testbench of razor_protector at its default parameters.
//
// Runs the inner loops of four image-processing kernels as VLIW programs:
//   FI      sum of absolute differences (SUB, ASR, XOR, ADD)
//   unsharp (x - blur) * k >> s added back to x, weighted sum and sign count
//           (SUB, MUL, ASR, ADD, MUL_ADD, CMPLT)
//   blur    (p0 + 2 p1 + p2) >> 2 and its energy (ADD, LSL, LSR, MUL_ADD)
//   FI-a    minimum search over candidate SADs (CMPLT, SUB, MUL, ADD)
// Pixel values enter through set-immediate operations, standing in for the
// loads of the host processor. Each kernel body is written as a list of
// operations and packed in order into groups of up to three independent
// operations, so the group sizes (IPC) follow from the kernel's own data
// dependences. Every iteration ends with loop_end, so that one tuning
// interval is one loop body, and RISK_th tuning is enabled.
//
// Each kernel runs three phases: nominal supply, an IR-drop (random setup
// violations on all lanes) and recovery. Every register write is compared
// with a reference execution, and at the end of each kernel its result
// registers are compared with the kernel computed directly in integers. A
// kernel whose IR-drop phase saw neither a bubble nor a flush fails. The
// statistics of each kernel are printed.
//
// unsharp is then run again from reset with a fixed RISK_th of 0.01 %, 0.1 %
// and 1 % (tuning off) and with tuning on, the comparison the document makes
// between static and adaptive thresholds. A lower fixed RISK_th gives a lower
// DCF_th during the IR-drop, so the run at 0.01 % must put at least as many
// operations in R_mode as the run at 0.1 %, and that run at least as many as
// the run at 1 %, with the 0.01 % run strictly above the 1 % run. One 20 mV
// supply step settles in 200 cycles, 100 us/V at 100 MHz.
module tb_rp_kernels;
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
  logic              tune_en = 1'b1;
  logic [6:0]        risk_init = 7'd10;

  razor_protector dut (
    .clk(clk), .rst_n(rst_n), .bundle_valid(bundle_valid), .bundle(bundle), .bundle_ready(bundle_ready),
    .loop_end(loop_end), .late(late),
    .lut_we(1'b0), .lut_waddr('0), .lut_wdata('0),
    .cfg_tune_en(tune_en), .cfg_risk_init(risk_init), .cfg_sample_interval(16'd0),
    .cfg_weight(4'd1), .cfg_err_tol(16'd5), .cfg_down_step(8'd10),
    .cfg_up_step(8'd20), .cfg_settle_cycles(24'd200),
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

  // reference execution of every accepted group
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

  // IR-drop stimulus: per-mille chance of a late result on each lane
  int late_pm = 0;
  initial begin
    fork
      forever begin
        @(negedge clk);
        for (int l = 0; l < 3; l++) late[l] = ($urandom_range(0, 999) < late_pm);
      end
    join_none
  end

  // ------------------------------------------------------------ programs
  slot_t prog [$];

  function automatic slot_t mk(logic [7:0] op, int rd, int rs1, int rs2, int imm);
    slot_t s;
    s.valid = 1'b1;
    s.op    = op;
    s.rd    = 5'(rd);
    s.rs1   = 5'(rs1);
    s.rs2   = 5'(rs2);
    s.imm   = 16'(imm);
    return s;
  endfunction

  function automatic bit reads(slot_t s, logic [4:0] r);
    bit r1, r2;
    r1 = (s.op != OP_SETI) && s.rs1 == r;
    r2 = (s.op != OP_SETI) && (s.op != OP_ADDI) && (s.op != OP_MOV) && s.rs2 == r;
    return r1 || r2 || (s.op == OP_MULADD && s.rd == r);
  endfunction

  task automatic send(input slot_t g [3]);
    @(negedge clk);
    bundle_valid = 1'b1;
    for (int s = 0; s < 3; s++) bundle[s] = g[s];
    do @(posedge clk); while (!bundle_ready);
  endtask

  // pack the program in order into groups of independent operations
  task automatic issue_prog();
    slot_t g [3];
    int n;
    n = 0;
    for (int s = 0; s < 3; s++) g[s] = '0;
    foreach (prog[i]) begin
      bit dep;
      dep = 1'b0;
      for (int s = 0; s < n; s++)
        if (reads(prog[i], g[s].rd) || reads(g[s], prog[i].rd) || g[s].rd == prog[i].rd) dep = 1'b1;
      if (dep || n == 3) begin
        send(g);
        n = 0;
        for (int s = 0; s < 3; s++) g[s] = '0;
      end
      g[n] = prog[i];
      n++;
    end
    if (n != 0) send(g);
    prog.delete();
    @(negedge clk);
    bundle_valid = 1'b0;
    bundle = '0;
    loop_end = 1'b1;
    @(negedge clk);
    loop_end = 1'b0;
  endtask

  task automatic drain();
    @(negedge clk);
    bundle_valid = 1'b0;
    bundle = '0;
    repeat (3) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // register conventions: r0 = 0, r31 = 31, r28 = 2, r25 = 1, r29 = 3,
  // r27 = 5; r30 and r26 are accumulators
  logic [31:0] k_acc, k_aux;

  // FI: SAD of six pixel pairs
  task automatic body_fi();
    int a [6], b [6];
    for (int i = 0; i < 6; i++) begin
      a[i] = $urandom_range(0, 255);
      b[i] = $urandom_range(0, 255);
      prog.push_back(mk(OP_SETI, 1 + i, 0, 0, a[i]));
      prog.push_back(mk(OP_SETI, 7 + i, 0, 0, b[i]));
      k_acc += 32'((a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i]);
    end
    for (int i = 0; i < 6; i++) begin
      prog.push_back(mk(OP_SUB, 13 + i, 1 + i, 7 + i, 0));    // d = a - b
      prog.push_back(mk(OP_ASR, 19 + i, 13 + i, 31, 0));      // s = d >>> 31
      prog.push_back(mk(OP_XOR, 1 + i, 13 + i, 19 + i, 0));   // t = d ^ s
      prog.push_back(mk(OP_SUB, 7 + i, 1 + i, 19 + i, 0));    // |d| = t - s
    end
    for (int i = 0; i < 6; i++) prog.push_back(mk(OP_ADD, 30, 30, 7 + i, 0));
  endtask

  // unsharp: y = x + ((x - bl) * 3 >>> 2); acc += 5 y; neg += (y < 0)
  task automatic body_unsharp();
    int x [4], bl [4];
    for (int i = 0; i < 4; i++) begin
      int y;
      x[i]  = $urandom_range(0, 255);
      bl[i] = $urandom_range(0, 255);
      prog.push_back(mk(OP_SETI, 1 + i, 0, 0, x[i]));
      prog.push_back(mk(OP_SETI, 5 + i, 0, 0, bl[i]));
      y = x[i] + (((x[i] - bl[i]) * 3) >>> 2);
      k_acc += 32'(5 * y);
      if (y < 0) k_aux += 1;
    end
    for (int i = 0; i < 4; i++) begin
      prog.push_back(mk(OP_SUB, 9 + i, 1 + i, 5 + i, 0));     // d = x - bl
      prog.push_back(mk(OP_MUL, 13 + i, 9 + i, 29, 0));       // m = 3 d
      prog.push_back(mk(OP_ASR, 17 + i, 13 + i, 28, 0));      // m >>> 2
      prog.push_back(mk(OP_ADD, 21 + i, 1 + i, 17 + i, 0));   // y = x + ...
      prog.push_back(mk(OP_CMPLT, 9 + i, 21 + i, 0, 0));      // y < 0
    end
    for (int i = 0; i < 4; i++) begin
      prog.push_back(mk(OP_MULADD, 30, 21 + i, 27, 0));       // acc += 5 y
      prog.push_back(mk(OP_ADD, 26, 26, 9 + i, 0));           // neg count
    end
  endtask

  // blur: o_j = (p_j + 2 p_j+1 + p_j+2) >> 2 over six pixels; acc += o,
  // energy += o * o
  task automatic body_blur();
    int p [6];
    for (int i = 0; i < 6; i++) begin
      p[i] = $urandom_range(0, 255);
      prog.push_back(mk(OP_SETI, 1 + i, 0, 0, p[i]));
    end
    for (int j = 0; j < 4; j++) begin
      int o;
      o = (p[j] + 2 * p[j+1] + p[j+2]) >> 2;
      k_acc += 32'(o);
      k_aux += 32'(o * o);
      prog.push_back(mk(OP_LSL, 7 + j, 2 + j, 25, 0));        // 2 p1
      prog.push_back(mk(OP_ADD, 11 + j, 1 + j, 3 + j, 0));    // p0 + p2
      prog.push_back(mk(OP_ADD, 15 + j, 11 + j, 7 + j, 0));
      prog.push_back(mk(OP_LSR, 19 + j, 15 + j, 28, 0));      // >> 2
    end
    for (int j = 0; j < 4; j++) begin
      prog.push_back(mk(OP_ADD, 30, 30, 19 + j, 0));
      prog.push_back(mk(OP_MULADD, 26, 19 + j, 19 + j, 0));
    end
  endtask

  // FI-a: running minimum of four candidate SADs: min += (c < min) * (c - min)
  task automatic body_fia();
    for (int i = 0; i < 4; i++) begin
      int c;
      c = $urandom_range(0, 30000);
      prog.push_back(mk(OP_SETI, 1 + i, 0, 0, c));
      if (32'(c) < k_acc) k_acc = 32'(c);
    end
    for (int i = 0; i < 4; i++) begin
      prog.push_back(mk(OP_CMPLT, 5 + i, 1 + i, 30, 0));
      prog.push_back(mk(OP_SUB, 9 + i, 1 + i, 30, 0));
      prog.push_back(mk(OP_MUL, 13 + i, 5 + i, 9 + i, 0));
      prog.push_back(mk(OP_ADD, 30, 30, 13 + i, 0));
    end
  endtask

  int last_r_ops, last_cycles;

  task automatic run_kernel(input int kind, input string name, input int iters);
    int o0, c0, r0, f0, x0;
    int o1, c1, r1, f1, x1;
    int f_drop, x_drop;
    // constants and accumulators
    prog.push_back(mk(OP_SETI, 31, 0, 0, 31));
    prog.push_back(mk(OP_SETI, 28, 0, 0, 2));
    prog.push_back(mk(OP_SETI, 25, 0, 0, 1));
    prog.push_back(mk(OP_SETI, 29, 0, 0, 3));
    prog.push_back(mk(OP_SETI, 27, 0, 0, 5));
    prog.push_back(mk(OP_SETI, 30, 0, 0, (kind == 3) ? 32767 : 0));
    prog.push_back(mk(OP_SETI, 26, 0, 0, 0));
    issue_prog();
    k_acc = (kind == 3) ? 32'd32767 : 32'd0;
    k_aux = 32'd0;
    o0 = int'(stat_ops); c0 = cyc; r0 = int'(stat_r_ops); f0 = int'(stat_flush); x0 = int'(stat_fix);
    for (int ph = 0; ph < 3; ph++) begin
      late_pm = (ph == 1) ? 15 : 0;
      if (ph == 1) begin f_drop = int'(stat_flush); x_drop = int'(stat_fix); end
      for (int it = 0; it < iters; it++) begin
        case (kind)
          0: body_fi();
          1: body_unsharp();
          2: body_blur();
          default: body_fia();
        endcase
        issue_prog();
      end
      if (ph == 1) begin
        f_drop = int'(stat_flush) - f_drop;
        x_drop = int'(stat_fix) - x_drop;
      end
    end
    late_pm = 0;
    drain();
    o1 = int'(stat_ops) - o0; c1 = cyc - c0; r1 = int'(stat_r_ops) - r0;
    f1 = int'(stat_flush) - f0; x1 = int'(stat_fix) - x0;
    last_r_ops = r1;
    last_cycles = c1;
    dbg_raddr = 5'd30;
    #1 check(dbg_rdata == k_acc, $sformatf("%s: result %0d, expected %0d", name, dbg_rdata, k_acc));
    if (kind == 1 || kind == 2) begin
      @(negedge clk);
      dbg_raddr = 5'd26;
      #1 check(dbg_rdata == k_aux, $sformatf("%s: second result %0d, expected %0d", name, dbg_rdata, k_aux));
    end
    check(f_drop + x_drop > 0, $sformatf("%s: IR-drop phase caused no recovery", name));
    check(expq.size() == 0, $sformatf("%s: %0d expected writes missing", name, expq.size()));
    $display("%-8s ops=%0d cycles=%0d ops/cycle=%0.2f R_mode ops=%0d flushes=%0d bubbles=%0d (IR-drop: %0d/%0d) RISK_th=%0d DCF_th=%0d vdd=%0d",
             name, o1, c1, real'(o1) / real'(c1), r1, f1, x1, f_drop, x_drop, risk_th, dcf_th, vdd_mv);
  endtask

  initial begin
    for (int r = 0; r < 32; r++) mregs[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_kernel(0, "FI", 700);
    run_kernel(1, "unsharp", 700);
    run_kernel(2, "blur", 700);
    run_kernel(3, "FI-a", 700);
    begin
      int r_static [3];
      int risks [3] = '{1, 10, 100};
      for (int k = 0; k < 4; k++) begin
        drain();
        rst_n = 1'b0;
        tune_en = (k == 3);
        risk_init = (k == 3) ? 7'd10 : 7'(risks[k]);
        repeat (3) @(negedge clk);
        for (int r = 0; r < 32; r++) mregs[r] = '0;
        rst_n = 1'b1;
        @(negedge clk);
        run_kernel(1, (k == 3) ? "us-adapt" : $sformatf("us-%0d", risks[k]), 300);
        if (k < 3) r_static[k] = last_r_ops;
      end
      check(r_static[0] >= r_static[1] && r_static[1] >= r_static[2] && r_static[0] > r_static[2],
            $sformatf("R_mode ops at RISK_th 0.01/0.1/1 %%: %0d/%0d/%0d, expected decreasing",
                      r_static[0], r_static[1], r_static[2]));
    end
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      dbg_raddr = 5'(r);
      #1 check(dbg_rdata == mregs[r], $sformatf("final r%0d = %h, expected %h", r, dbg_rdata, mregs[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
