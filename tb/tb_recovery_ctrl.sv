// Testbench of recovery_ctrl.
// Directed: an isolated P_mode error blocks issue for N_DEPTH-2 cycles (the
// issue stage adds one more, and the replayed packet reaches EX N_DEPTH
// cycles after its first attempt); an isolated R_mode error gives fix for one
// cycle and fix_q in the next. Random: a cycle model of the same rules.
module tb_recovery_ctrl;
  import rp_pkg::*;
  localparam int N_DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wb_valid = 1'b0;
  mode_e wb_mode = P_MODE;
  logic [2:0] wb_err = '0;
  logic fix, fix_q, flush, issue_block;
  int checks = 0, failures = 0;
  recovery_ctrl #(.N_DEPTH(N_DEPTH)) dut (.clk(clk), .rst_n(rst_n), .wb_valid(wb_valid), .wb_mode(wb_mode),
    .wb_err(wb_err), .fix(fix), .fix_q(fix_q), .flush(flush), .issue_block(issue_block));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int blocked;
    int cnt;
    logic fq;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // isolated P_mode error
    @(negedge clk);
    wb_valid = 1'b1; wb_mode = P_MODE; wb_err = 3'b100;
    #1 chk(flush && !fix && issue_block, "P_mode error flushes");
    blocked = 1;
    @(negedge clk);
    wb_valid = 1'b0; wb_err = '0;
    for (int i = 0; i < 10; i++) begin
      #1 if (issue_block) blocked++;
      @(negedge clk);
    end
    chk(blocked == N_DEPTH - 2, $sformatf("flush blocks issue %0d cycles, expected %0d", blocked, N_DEPTH - 2));
    // isolated R_mode error
    wb_valid = 1'b1; wb_mode = R_MODE; wb_err = 3'b001;
    #1 chk(fix && !flush && issue_block && !fix_q, "R_mode error fixes");
    @(negedge clk);
    wb_valid = 1'b0; wb_err = '0;
    #1 chk(fix_q && !fix && !issue_block, "substitution cycle follows, issue free");
    @(negedge clk);
    #1 chk(!fix_q && !issue_block, "one bubble only");
    // no error, no action
    wb_valid = 1'b1; wb_mode = P_MODE; wb_err = '0;
    #1 chk(!fix && !flush && !issue_block, "clean write-back");
    // random against a cycle model
    cnt = 0; fq = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic e, mfix, mflush;
      @(negedge clk);
      wb_valid = $urandom_range(0, 1);
      wb_mode  = mode_e'($urandom_range(0, 1));
      wb_err   = ($urandom_range(0, 3) == 0) ? ((wb_mode == R_MODE) ? 3'b001 : 3'($urandom_range(1, 7))) : '0;
      #1;
      e = wb_valid && wb_err != 0;
      mfix = e && wb_mode == R_MODE;
      mflush = e && wb_mode == P_MODE;
      chk(fix == mfix && flush == mflush && fix_q == fq && issue_block == (mfix || mflush || cnt != 0),
          $sformatf("random cycle %0d", i));
      @(posedge clk);
      fq = mfix;
      if (mflush) cnt = N_DEPTH - 3; else if (cnt != 0) cnt--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
