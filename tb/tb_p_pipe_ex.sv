// Testbench of p_pipe_ex: a random operation each cycle; one cycle later q
// must hold its result (or the previous one when the capture was late) and
// err must flag the late captures that left a wrong value.
module tb_p_pipe_ex;
  import rp_pkg::*;
  import tb_rp_model_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, late = 1'b0;
  logic [7:0] op = '0;
  logic [31:0] a = '0, b = '0, c = '0, q, sq;
  logic err;
  int checks = 0, failures = 0, n_err = 0;
  logic [31:0] mq;
  p_pipe_ex #(.DATA_W(32)) dut (.clk(clk), .rst_n(rst_n), .en(en), .op(op), .a(a), .b(b), .c(c), .late(late),
                                .q(q), .shadow_q(sq), .err(err));
  initial begin
    mq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r;
      @(negedge clk);
      en = 1'b1; late = ($urandom_range(0, 4) == 0);
      op = OPS[$urandom_range(0, 13)]; a = $urandom; b = $urandom; c = $urandom;
      r = ref_op(op, a, b, c, b[15:0]);
      if (op_has_imm(op)) begin b = {{16{b[15]}}, b[15:0]}; r = ref_op(op, a, b, c, b[15:0]); end
      @(posedge clk);
      #1;
      checks++;
      if (late) begin
        if (q !== mq || err !== (mq != r) || sq !== r) begin failures++; $display("FAIL late %0d", i); end
        if (err) n_err++;
      end else begin
        if (q !== r || err !== 1'b0) begin failures++; $display("FAIL op=%h q=%h want=%h", op, q, r); end
        mq = r;
      end
    end
    checks++;
    if (n_err == 0) failures++;
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
