// Testbench of r_pipe_ex.
// Parallel mode: a random operation per cycle, checked like the P-PIPE.
// Redundant mode: operations started on alternate cycles with late asserted;
// r_res must hold the correct result exactly two cycles after the start
// (r_done), regardless of late and of what the inputs do in the second cycle,
// and err must stay low. A restart in the second cycle must win.
module tb_r_pipe_ex;
  import rp_pkg::*;
  import tb_rp_model_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic par_en = 1'b0, r_start = 1'b0, late = 1'b0;
  logic [7:0] op = '0;
  logic [31:0] a = '0, b = '0, c = '0, q, sq, r_res;
  logic err, r_busy, r_done;
  int checks = 0, failures = 0;

  r_pipe_ex #(.DATA_W(32)) dut (.clk(clk), .rst_n(rst_n), .par_en(par_en), .r_start(r_start), .op(op),
    .a(a), .b(b), .c(c), .late(late), .q(q), .shadow_q(sq), .err(err), .r_busy(r_busy), .r_res(r_res), .r_done(r_done));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] rnd_op(output logic [7:0] o, output logic [31:0] x, output logic [31:0] y, output logic [31:0] z);
    o = OPS[$urandom_range(0, 13)];
    x = $urandom; y = $urandom; z = $urandom;
    if (op_has_imm(o)) y = {{16{y[15]}}, y[15:0]};
    return ref_op(o, x, y, z, y[15:0]);
  endfunction

  initial begin
    logic [31:0] want, want2, mq;
    mq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // parallel mode
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      par_en = 1'b1; r_start = 1'b0; late = ($urandom_range(0, 4) == 0);
      want = rnd_op(op, a, b, c);
      @(posedge clk); #1;
      if (late) chk(q == mq && err == (mq != want), "parallel late capture");
      else begin chk(q == want && !err, $sformatf("parallel op %h q=%h want=%h", op, q, want)); mq = want; end
    end
    @(negedge clk); par_en = 1'b0; late = 1'b0;
    // redundant mode: start, then a cycle of garbage inputs, result after two cycles
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      r_start = 1'b1; late = 1'b1;
      want = rnd_op(op, a, b, c);
      @(negedge clk);
      r_start = 1'b0;
      a = $urandom; b = $urandom; c = $urandom; op = OPS[$urandom_range(0, 13)];
      chk(r_busy && !r_done && !err, "redundant: busy in second cycle");
      @(negedge clk);
      chk(r_done && r_res == want && !err, $sformatf("redundant result %h want %h", r_res, want));
    end
    // restart in the second cycle
    @(negedge clk);
    r_start = 1'b1;
    want = rnd_op(op, a, b, c);
    @(negedge clk);
    want2 = rnd_op(op, a, b, c);
    @(negedge clk);
    r_start = 1'b0;
    a = '0; b = '0; c = '0;
    @(negedge clk);
    chk(r_done && r_res == want2, "restart: second operation wins");
    late = 1'b0;
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
