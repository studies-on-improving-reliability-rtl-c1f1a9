// rp_core: the redundant data-path of RazorProtector.
//
// Three EX pipelines share one register file: lane 0 is the primary pipeline
// (P-PIPE), lanes 1 and 2 are the redundant pipelines R-PIPE even and odd.
// Instruction groups of up to three operations enter through a valid/ready
// port and pass three stages:
//
//   IS  issue: the group's mode is decided on entry (rp_mapper, DCF against
//       DCF_th). A P_mode group issues as one packet, slot i to lane i. An
//       R_mode group issues one operation per cycle, each to the P-PIPE and to
//       one R-PIPE, the R-PIPEs taken in turn (even, odd, even, ...). Operands
//       are read from the register file (with write-through) at issue.
//   EX  execution: P-PIPE and P_mode lanes execute in one cycle into Razor
//       registers; an R-PIPE in R_mode takes two cycles and cannot fail.
//       Operands are forwarded from the write-back stage, so back-to-back
//       dependent operations run at full rate; both the P-PIPE and the R-PIPE
//       of an R_mode operation take the same forwarded values, which is how an
//       R-PIPE gets the result of the operation that the other R-PIPE is still
//       finishing.
//   WB  write-back: the Razor registers report errors; recovery_ctrl decides.
//       A P-PIPE error in R_mode costs a one-cycle bubble: the R-PIPE result
//       replaces the failed one a cycle later and is forwarded to the held EX
//       operation, which executes again. An error in P_mode discards the WB
//       and EX packets, puts them in a two-entry replay buffer and re-issues
//       them so that they reach EX N_DEPTH cycles later.
//
// In the cycle after an R_mode operation its R-PIPE is in its second cycle. A
// P_mode packet that follows directly may not use that lane: if its operation
// for that lane can move to the other R-PIPE (whose slot is empty) it is
// moved there, otherwise the packet waits one cycle. Only a packet that needs
// all three lanes pays for a switch from R_mode to P_mode; switching from
// P_mode to R_mode is always free.
// Operations within one group must be independent (no slot reads a register
// another slot of the same group writes, no two slots write one register), as
// for any VLIW group; an assertion checks it.
//
// late[l] stands for a setup violation of lane l's result in this cycle (see
// razor_ff). Outputs report every register write, per-cycle error-sampling and
// tuning events, and event counters. The pipeline organisation, the bubble and
// the replay follow the document; the stage boundaries, the replay buffer, the
// lane remapping and the mode-switch wait are this design's choices (the
// document assumes mode switches cost nothing).
module rp_core
  import rp_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NUM_GR      = 32,
  parameter int unsigned N_DEPTH     = 5,
  parameter int unsigned DCF_ENTRIES = 256,
  localparam int unsigned GA         = $clog2(NUM_GR)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // instruction groups
  input  logic                          bundle_valid,
  input  slot_t [LANES-1:0]             bundle,
  output logic                          bundle_ready,
  // setup violations per lane (physical effect of the supply voltage)
  input  logic [LANES-1:0]              late,
  // redundancy control
  input  logic [DCF_TH_W-1:0]           dcf_th,
  input  logic                          lut_we,
  input  logic [$clog2(DCF_ENTRIES)-1:0] lut_waddr,
  input  logic [DCF_W-1:0]              lut_wdata,
  // register writes
  output logic [LANES-1:0]              wb_we,
  output logic [LANES-1:0][GA-1:0]      wb_waddr,
  output logic [LANES-1:0][DATA_W-1:0]  wb_wdata,
  // register file observation port
  input  logic [GA-1:0]                 dbg_raddr,
  output logic [DATA_W-1:0]             dbg_rdata,
  // error-rate sampling: operations checked by Razor registers and errors
  output logic [1:0]                    chk_ops,
  output logic [1:0]                    chk_errs,
  // tuning events: one per write-back evaluation
  output logic                          ev_valid,
  output logic                          ev_err,
  output mode_e                         ev_mode,
  output logic                          ev_last,
  output logic [1:0]                    ev_ipc,
  // status and counters
  output logic                          idle,
  output logic [31:0]                   stat_ops,
  output logic [31:0]                   stat_r_ops,
  output logic [31:0]                   stat_flush,
  output logic [31:0]                   stat_fix,
  output logic [31:0]                   stat_mode_switch,
  output logic [31:0]                   stat_switch_wait,
  output logic [31:0]                   stat_fwd
);

  localparam int unsigned RP = 3 * LANES + 1;   // nine operand ports and one observation port

  // ---------------------------------------------------------------- IS stage
  logic              is_valid;
  slot_t [LANES-1:0] is_grp;
  mode_e             is_mode;
  logic [1:0]        is_ipc;
  logic [1:0]        is_pos;

  mode_e             map_mode;
  logic [DCF_W-1:0]  map_dcf;
  logic [1:0]        map_ipc;

  rp_mapper #(.DCF_ENTRIES(DCF_ENTRIES)) u_mapper (
    .clk(clk), .rst_n(rst_n), .grp(bundle), .dcf_th(dcf_th),
    .lut_we(lut_we), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .mode(map_mode), .grp_dcf(map_dcf), .ipc(map_ipc)
  );

  // Next packet offered by the group in IS.
  packet_t is_cand;
  logic [1:0] is_next_pos;
  logic       found;
  always_comb begin
    is_cand     = '0;
    is_next_pos = is_pos;
    found       = 1'b0;
    if (is_valid) begin
      if (is_mode == P_MODE) begin
        is_cand.valid = 1'b1;
        is_cand.mode  = P_MODE;
        is_cand.last  = 1'b1;
        is_cand.ipc   = is_ipc;
        is_cand.slot  = is_grp;
      end else begin
        // first valid slot at or after is_pos; last if no valid slot follows
        is_cand.mode = R_MODE;
        is_cand.ipc  = is_ipc;
        is_cand.last = 1'b1;
        for (int s = 0; s < LANES; s++) begin
          if (s >= int'(is_pos) && is_grp[s].valid) begin
            if (!found) begin
              found            = 1'b1;
              is_cand.valid    = 1'b1;
              is_cand.slot[0]  = is_grp[s];
              is_next_pos      = 2'(s + 1);
            end else begin
              is_cand.last = 1'b0;
            end
          end
        end
      end
    end
  end

  // Replay buffer (filled by a flush, drained before the IS group).
  packet_t [1:0] rb;
  logic [1:0]    rb_cnt;

  // Pipeline registers
  packet_t                            ex_pkt;
  logic [LANES-1:0][2:0][DATA_W-1:0]  ex_opnd;   // per lane: rs1, rs2, rd
  packet_t                            wb_pkt;

  logic fix, fix_q, flush, issue_block;
  logic rtog;

  packet_t cand;
  logic    cand_from_rb;
  logic    switch_wait;
  logic    do_issue;
  packet_t iss_pkt;
  mode_e   last_mode;

  logic [1:0] busy_l, free_l;

  always_comb begin
    cand_from_rb  = (rb_cnt != '0);
    cand          = cand_from_rb ? rb[0] : is_cand;
    iss_pkt       = cand;
    iss_pkt.rlane = rtog;
    // The R-PIPE of the R_mode operation now in EX is busy next cycle. A
    // P_mode packet that leaves that lane empty issues at once; one whose
    // operation for that lane can move to the other, empty R-PIPE is
    // remapped (slot order is kept, as the other slot is empty); otherwise
    // it waits one cycle.
    busy_l      = ex_pkt.rlane ? 2'd2 : 2'd1;
    free_l      = ex_pkt.rlane ? 2'd1 : 2'd2;
    switch_wait = 1'b0;
    if (cand.valid && cand.mode == P_MODE && ex_pkt.valid && ex_pkt.mode == R_MODE &&
        cand.slot[busy_l].valid) begin
      if (!cand.slot[free_l].valid) begin
        iss_pkt.slot[free_l] = cand.slot[busy_l];
        iss_pkt.slot[busy_l] = '0;
      end else begin
        switch_wait = 1'b1;
      end
    end
    do_issue = cand.valid && !issue_block && !switch_wait;
  end

  assign bundle_ready = !is_valid || (do_issue && !cand_from_rb && is_cand.last);

  // Register file
  logic [RP-1:0][GA-1:0]     rf_raddr;
  logic [RP-1:0][DATA_W-1:0] rf_rdata;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rf_raddr[3*l+0] = GA'(iss_pkt.slot[l].rs1);
      rf_raddr[3*l+1] = GA'(iss_pkt.slot[l].rs2);
      rf_raddr[3*l+2] = GA'(iss_pkt.slot[l].rd);
    end
    rf_raddr[RP-1] = dbg_raddr;
  end
  assign dbg_rdata = rf_rdata[RP-1];

  regfile #(.NUM_REGS(NUM_GR), .DATA_W(DATA_W), .RPORTS(RP), .WPORTS(LANES)) u_rf (
    .clk(clk), .rst_n(rst_n), .raddr(rf_raddr), .rdata(rf_rdata),
    .we(wb_we), .waddr(wb_waddr), .wdata(wb_wdata)
  );

  // ---------------------------------------------------------------- EX stage
  // Operand forwarding from this cycle's register writes.
  logic [LANES-1:0][2:0][DATA_W-1:0] fwd;
  logic [LANES-1:0][2:0][GA-1:0]     src;
  logic                              fwd_hit;

  always_comb begin
    fwd_hit = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      src[l][0] = GA'(ex_pkt.slot[l].rs1);
      src[l][1] = GA'(ex_pkt.slot[l].rs2);
      src[l][2] = GA'(ex_pkt.slot[l].rd);
      for (int k = 0; k < 3; k++) begin
        fwd[l][k] = ex_opnd[l][k];
        for (int w = 0; w < LANES; w++) begin
          if (wb_we[w] && wb_waddr[w] == src[l][k]) begin
            fwd[l][k] = wb_wdata[w];
            if (ex_pkt.valid && ex_pkt.slot[l].valid) fwd_hit = 1'b1;
          end
        end
      end
    end
  end

  // Lane inputs: in R_mode both the P-PIPE and the chosen R-PIPE take slot 0.
  logic [LANES-1:0][OP_W-1:0]   l_op;
  logic [LANES-1:0][DATA_W-1:0] l_a, l_b, l_c;
  logic [LANES-1:0]             l_par_en;
  logic [LANES-1:0]             l_r_start;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      if (ex_pkt.mode == R_MODE) begin
        l_op[l] = ex_pkt.slot[0].op;
        l_a[l]  = fwd[0][0];
        l_b[l]  = op_has_imm(ex_pkt.slot[0].op) ? DATA_W'($signed(ex_pkt.slot[0].imm)) : fwd[0][1];
        l_c[l]  = fwd[0][2];
      end else begin
        l_op[l] = ex_pkt.slot[l].op;
        l_a[l]  = fwd[l][0];
        l_b[l]  = op_has_imm(ex_pkt.slot[l].op) ? DATA_W'($signed(ex_pkt.slot[l].imm)) : fwd[l][1];
        l_c[l]  = fwd[l][2];
      end
      l_par_en[l]  = ex_pkt.valid && ex_pkt.slot[l].valid && (ex_pkt.mode == P_MODE || l == 0);
      l_r_start[l] = ex_pkt.valid && ex_pkt.mode == R_MODE && l != 0 && int'(ex_pkt.rlane) == l - 1;
    end
  end

  logic [LANES-1:0][DATA_W-1:0] l_q, l_shadow, l_rres;
  logic [LANES-1:0]             l_err, l_rbusy, l_rdone;

  p_pipe_ex #(.DATA_W(DATA_W)) u_ppipe (
    .clk(clk), .rst_n(rst_n), .en(l_par_en[0]), .op(l_op[0]),
    .a(l_a[0]), .b(l_b[0]), .c(l_c[0]), .late(late[0]),
    .q(l_q[0]), .shadow_q(l_shadow[0]), .err(l_err[0])
  );
  assign l_rbusy[0] = 1'b0;
  assign l_rdone[0] = 1'b0;
  assign l_rres[0]  = '0;

  for (genvar g = 1; g < LANES; g++) begin : g_rpipe
    r_pipe_ex #(.DATA_W(DATA_W)) u_rpipe (
      .clk(clk), .rst_n(rst_n), .par_en(l_par_en[g]), .r_start(l_r_start[g]),
      .op(l_op[g]), .a(l_a[g]), .b(l_b[g]), .c(l_c[g]), .late(late[g]),
      .q(l_q[g]), .shadow_q(l_shadow[g]), .err(l_err[g]),
      .r_busy(l_rbusy[g]), .r_res(l_rres[g]), .r_done(l_rdone[g])
    );
  end

  // ---------------------------------------------------------------- WB stage
  logic             wb_eval;
  logic [LANES-1:0] wb_chk;
  logic [LANES-1:0] wb_err;

  always_comb begin
    wb_eval = wb_pkt.valid && !fix_q;
    for (int l = 0; l < LANES; l++)
      wb_chk[l] = wb_eval && wb_pkt.slot[l].valid && (wb_pkt.mode == P_MODE || l == 0);
    wb_err = wb_chk & l_err;
  end

  recovery_ctrl #(.N_DEPTH(N_DEPTH)) u_recovery (
    .clk(clk), .rst_n(rst_n), .wb_valid(wb_eval), .wb_mode(wb_pkt.mode), .wb_err(wb_err),
    .fix(fix), .fix_q(fix_q), .flush(flush), .issue_block(issue_block)
  );

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      wb_waddr[l] = GA'(wb_pkt.slot[l].rd);
      wb_wdata[l] = l_q[l];
      wb_we[l]    = wb_chk[l] && (wb_err == '0);
    end
    if (fix_q) begin
      wb_we[0]    = 1'b1;
      wb_wdata[0] = wb_pkt.rlane ? l_rres[2] : l_rres[1];
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    chk_ops  = '0;
    chk_errs = '0;
    for (int l = 0; l < LANES; l++) begin
      chk_ops  = chk_ops  + 2'(wb_chk[l]);
      chk_errs = chk_errs + 2'(wb_err[l]);
    end
  end
  assign ev_valid = wb_eval;
  assign ev_err   = (wb_err != '0);
  assign ev_mode  = wb_pkt.mode;
  assign ev_last  = wb_pkt.last;
  assign ev_ipc   = wb_pkt.ipc;

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_valid  <= 1'b0;
      is_grp    <= '0;
      is_mode   <= P_MODE;
      is_ipc    <= '0;
      is_pos    <= '0;
      rb        <= '0;
      rb_cnt    <= '0;
      ex_pkt    <= '0;
      ex_opnd   <= '0;
      wb_pkt    <= '0;
      rtog      <= 1'b0;
      last_mode <= P_MODE;
    end else begin
      // IS group bookkeeping
      if (do_issue && !cand_from_rb) begin
        if (is_cand.last) is_valid <= 1'b0;
        else              is_pos   <= is_next_pos;
      end
      if (bundle_valid && bundle_ready && map_ipc != '0) begin
        is_valid <= 1'b1;
        is_grp   <= bundle;
        is_mode  <= map_mode;
        is_ipc   <= map_ipc;
        is_pos   <= '0;
      end

      // replay buffer
      if (flush) begin
        if (wb_pkt.valid && ex_pkt.valid) begin
          rb[0] <= wb_pkt; rb[1] <= ex_pkt; rb_cnt <= 2'd2;
        end else begin
          rb[0] <= wb_pkt; rb_cnt <= 2'd1;
        end
      end else if (do_issue && cand_from_rb) begin
        rb[0]  <= rb[1];
        rb_cnt <= rb_cnt - 2'd1;
      end

      // pipeline registers
      if (flush) begin
        ex_pkt.valid <= 1'b0;
        wb_pkt.valid <= 1'b0;
      end else if (fix) begin
        // bubble: EX packet stays and re-executes, WB packet waits for the R-PIPE
      end else begin
        wb_pkt <= ex_pkt;
        if (do_issue) begin
          ex_pkt <= iss_pkt;
          for (int l = 0; l < LANES; l++)
            for (int k = 0; k < 3; k++)
              ex_opnd[l][k] <= rf_rdata[3*l+k];
        end else begin
          ex_pkt.valid <= 1'b0;
        end
      end

      if (do_issue) begin
        last_mode <= cand.mode;
        if (cand.mode == R_MODE) rtog <= ~rtog;
      end
    end
  end

  assign idle = !is_valid && rb_cnt == '0 && !ex_pkt.valid && !wb_pkt.valid && !fix_q && !issue_block;

  // ---------------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_ops         <= '0;
      stat_r_ops       <= '0;
      stat_flush       <= '0;
      stat_fix         <= '0;
      stat_mode_switch <= '0;
      stat_switch_wait <= '0;
      stat_fwd         <= '0;
    end else begin
      stat_ops <= stat_ops + 32'(wb_we[0]) + 32'(wb_we[1]) + 32'(wb_we[2]);
      if (fix_q)                                    stat_r_ops <= stat_r_ops + 1;
      else if (wb_we[0] && wb_pkt.mode == R_MODE)   stat_r_ops <= stat_r_ops + 1;
      if (flush)                                    stat_flush <= stat_flush + 1;
      if (fix)                                      stat_fix   <= stat_fix + 1;
      if (do_issue && cand.mode != last_mode)       stat_mode_switch <= stat_mode_switch + 1;
      if (switch_wait && !issue_block)              stat_switch_wait <= stat_switch_wait + 1;
      if (fwd_hit && !fix && !flush)                stat_fwd <= stat_fwd + 1;
    end
  end

  // ---------------------------------------------------------------- checks
  // A VLIW group holds independent operations.
  function automatic logic grp_independent(slot_t [LANES-1:0] g);
    for (int i = 0; i < LANES; i++)
      for (int j = 0; j < LANES; j++)
        if (i != j && g[i].valid && g[j].valid &&
            ((g[i].rd == g[j].rs1 && g[j].op != OP_SETI) ||
             (g[i].rd == g[j].rs2 && !op_has_imm(g[j].op) && g[j].op != OP_MOV) ||
             g[i].rd == g[j].rd))
          return 1'b0;
    return 1'b1;
  endfunction

  a_grp_indep: assert property (@(posedge clk) disable iff (!rst_n)
                                (bundle_valid && bundle_ready) |-> grp_independent(bundle));
  a_rb_empty_on_flush: assert property (@(posedge clk) disable iff (!rst_n) flush |-> rb_cnt == '0);
  a_fix_has_result: assert property (@(posedge clk) disable iff (!rst_n)
                                     fix_q |-> (wb_pkt.rlane ? l_rdone[2] : l_rdone[1]));
  a_bundle_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                    (bundle_valid && !bundle_ready) |=> bundle_valid);

endmodule
