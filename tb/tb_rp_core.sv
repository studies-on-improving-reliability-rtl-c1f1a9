// Testbench of rp_core, the redundant data-path.
//
// A reference model applies each accepted group to a model register file with
// VLIW semantics (all operations of a group read the state before the group)
// and queues the expected register writes in order; every write of the core
// is compared with that queue, and the register file is compared at the end.
// Directed runs check the timing the design promises: one P_mode group per
// cycle, one R_mode operation per cycle, a one-cycle bubble for a P-PIPE error
// in R_mode, an N_DEPTH-cycle penalty for an error in P_mode, and a one-cycle
// wait when switching from R_mode to P_mode. A random run mixes modes,
// setup violations and input gaps.
module tb_rp_core;
  import rp_pkg::*;
  import tb_rp_model_pkg::*;

  localparam int N_DEPTH = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  bundle_valid = 1'b0;
  slot_t [2:0]           bundle = '0;
  logic                  bundle_ready;
  logic [2:0]            late = '0;
  logic [DCF_TH_W-1:0]   dcf_th = '1;
  logic [2:0]            wb_we;
  logic [2:0][4:0]       wb_waddr;
  logic [2:0][31:0]      wb_wdata;
  logic [4:0]            dbg_raddr = '0;
  logic [31:0]           dbg_rdata;
  logic [1:0]            chk_ops, chk_errs, ev_ipc;
  logic                  ev_valid, ev_err, ev_last, idle;
  mode_e                 ev_mode;
  logic [31:0]           stat_ops, stat_r_ops, stat_flush, stat_fix, stat_mode_switch, stat_switch_wait, stat_fwd;

  rp_core #(.N_DEPTH(N_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .bundle_valid(bundle_valid), .bundle(bundle), .bundle_ready(bundle_ready),
    .late(late), .dcf_th(dcf_th), .lut_we(1'b0), .lut_waddr('0), .lut_wdata('0),
    .wb_we(wb_we), .wb_waddr(wb_waddr), .wb_wdata(wb_wdata), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .chk_ops(chk_ops), .chk_errs(chk_errs), .ev_valid(ev_valid), .ev_err(ev_err), .ev_mode(ev_mode),
    .ev_last(ev_last), .ev_ipc(ev_ipc), .idle(idle),
    .stat_ops(stat_ops), .stat_r_ops(stat_r_ops), .stat_flush(stat_flush), .stat_fix(stat_fix),
    .stat_mode_switch(stat_mode_switch), .stat_switch_wait(stat_switch_wait), .stat_fwd(stat_fwd)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int first_wr = -1, last_wr = -1;
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

  // Model: apply accepted groups, queue expected writes in slot order.
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

  // Every register write must be the next expected one.
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
          if (first_wr < 0) first_wr = cyc;
          last_wr = cyc;
        end
      end
    end
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

  function automatic slot_t mk(logic [7:0] op, int rd, int rs1, int rs2, int imm);
    slot_t s;
    s.valid = 1'b1; s.op = op; s.rd = 5'(rd); s.rs1 = 5'(rs1); s.rs2 = 5'(rs2); s.imm = 16'(imm);
    return s;
  endfunction

  task automatic pulse_late(input int after, input logic [2:0] m);
    fork
      begin
        repeat (after) @(negedge clk);
        late = m;
        @(negedge clk);
        late = '0;
      end
    join_none
  endtask

  int span;
  int s_fix, s_flush, s_wait, s_rops;

  initial begin
    slot_t g [3];
    for (int r = 0; r < 32; r++) mregs[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- initialise registers (P_mode)
    dcf_th = '1;
    for (int r = 0; r < 32; r += 3) begin
      for (int s = 0; s < 3; s++) g[s] = (r + s < 32) ? mk(OP_SETI, r + s, 0, 0, $urandom) : '0;
      send(g);
    end
    drain();

    // ---- T1: P_mode, 30 three-operation groups, one per cycle
    first_wr = -1;
    for (int i = 0; i < 30; i++) begin rand_group(3, g); send(g); end
    drain();
    span = last_wr - first_wr;
    check(span == 29, $sformatf("P_mode 30 groups: write span %0d, expected 29", span));

    // ---- T2: R_mode, 10 groups of 3, one operation per cycle
    dcf_th = '0;
    s_rops = int'(stat_r_ops);
    first_wr = -1;
    for (int i = 0; i < 10; i++) begin
      rand_group(3, g);
      for (int s = 0; s < 3; s++) if (g[s].valid) begin g[s].op = OP_ADD; break; end
      send(g);
    end
    drain();
    span = last_wr - first_wr;
    check(span == 29, $sformatf("R_mode 30 operations: write span %0d, expected 29", span));
    check(int'(stat_r_ops) - s_rops == 30, "R_mode operation count");

    // ---- T3: back-to-back dependent chain in R_mode (forwarding across R-PIPEs)
    first_wr = -1;
    for (int i = 0; i < 10; i++) begin
      g[0] = mk(OP_ADD, 5, 5, 6, 0); g[1] = '0; g[2] = '0;
      send(g);
    end
    drain();
    check(last_wr - first_wr == 9, $sformatf("R_mode dependent chain span %0d, expected 9", last_wr - first_wr));

    // ---- T4: P-PIPE error in R_mode costs one bubble
    s_fix = int'(stat_fix);
    first_wr = -1;
    pulse_late(6, 3'b001);
    for (int i = 0; i < 12; i++) begin
      g[0] = mk(OP_MULADD, 7, 8, 9, 0); g[1] = '0; g[2] = '0;
      send(g);
    end
    drain();
    check(int'(stat_fix) - s_fix == 1, $sformatf("R_mode fixes %0d, expected 1", int'(stat_fix) - s_fix));
    check(last_wr - first_wr == 12, $sformatf("R_mode chain with one error: span %0d, expected 12", last_wr - first_wr));

    // ---- T5: error in P_mode costs a flush of N_DEPTH cycles
    dcf_th = '1;
    s_flush = int'(stat_flush);
    first_wr = -1;
    pulse_late(6, 3'b010);
    for (int i = 0; i < 12; i++) begin
      g[0] = mk(OP_ADDI, 1, 1, 1, 1); g[1] = mk(OP_ADDI, 2, 2, 2, 3); g[2] = mk(OP_ADD, 3, 3, 4, 0);
      send(g);
    end
    drain();
    check(int'(stat_flush) - s_flush == 1, $sformatf("P_mode flushes %0d, expected 1", int'(stat_flush) - s_flush));
    check(last_wr - first_wr == 11 + N_DEPTH,
          $sformatf("P_mode with one error: span %0d, expected %0d", last_wr - first_wr, 11 + N_DEPTH));

    // ---- T6: alternating R_mode / full-width P_mode groups, one-cycle wait on R->P
    dcf_th = DCF_TH_W'(100);     // ADD (17.4 %) is redundant, ADDI (0 %) is not
    s_wait = int'(stat_switch_wait);
    first_wr = -1;
    for (int i = 0; i < 6; i++) begin
      g[0] = mk(OP_ADD, 10, 10, 11, 0); g[1] = '0; g[2] = '0; send(g);
      g[0] = mk(OP_ADDI, 12, 12, 12, 5); g[1] = mk(OP_ADDI, 13, 13, 13, 7); g[2] = mk(OP_ADDI, 14, 14, 14, 9); send(g);
    end
    drain();
    check(int'(stat_switch_wait) - s_wait == 6, $sformatf("R->P waits %0d, expected 6", int'(stat_switch_wait) - s_wait));
    check(last_wr - first_wr == 17, $sformatf("alternating modes: span %0d, expected 17", last_wr - first_wr));

    // ---- T6b: two-operation P_mode groups after R_mode use the free R-PIPE: no wait
    s_wait = int'(stat_switch_wait);
    first_wr = -1;
    for (int i = 0; i < 6; i++) begin
      g[0] = mk(OP_ADD, 10, 10, 11, 0); g[1] = '0; g[2] = '0; send(g);
      g[0] = mk(OP_ADDI, 12, 12, 12, 5); g[1] = mk(OP_ADDI, 13, 13, 13, 7); g[2] = '0; send(g);
    end
    drain();
    check(int'(stat_switch_wait) - s_wait == 0, $sformatf("R->P waits %0d with a free R-PIPE, expected 0", int'(stat_switch_wait) - s_wait));
    check(last_wr - first_wr == 11, $sformatf("alternating modes, remapped: span %0d, expected 11", last_wr - first_wr));

    // ---- T7: random groups, modes, setup violations and gaps
    fork
      begin : rand_late
        forever begin
          @(negedge clk);
          for (int l = 0; l < 3; l++) late[l] = ($urandom_range(0, 99) < 4);
        end
      end
    join_none
    for (int i = 0; i < 600; i++) begin
      if (i % 12 == 0) begin
        case ($urandom_range(0, 2))
          0: dcf_th = '0;
          1: dcf_th = DCF_TH_W'(170);
          default: dcf_th = '1;
        endcase
      end
      rand_group($urandom_range(1, 3), g);
      send(g);
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); bundle_valid = 1'b0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
    end
    disable rand_late;
    late = '0;
    drain();
    check(stat_fix > 32'd1 && stat_flush > 32'd1, "random run exercised both recoveries");

    // ---- final register file and queue
    check(expq.size() == 0, $sformatf("%0d expected writes missing", expq.size()));
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      dbg_raddr = 5'(r);
      #1;
      check(dbg_rdata == mregs[r], $sformatf("final r%0d = %h, expected %h", r, dbg_rdata, mregs[r]));
    end
    $display("stats: ops=%0d r_ops=%0d flush=%0d fix=%0d switch=%0d wait=%0d fwd=%0d",
             stat_ops, stat_r_ops, stat_flush, stat_fix, stat_mode_switch, stat_switch_wait, stat_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
