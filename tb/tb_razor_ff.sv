// Testbench of razor_ff: random captures with and without a late arrival.
// Expected: q follows d unless late (then it keeps the old value), shadow_q
// always takes d, err is raised exactly when a late capture left q stale.
module tb_razor_ff;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, late = 1'b0;
  logic [31:0] d = '0, q, sq;
  logic err;
  int checks = 0, failures = 0;
  logic [31:0] mq, ms;
  logic mchk;

  razor_ff #(.WIDTH(32)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .late(late), .q(q), .shadow_q(sq), .err(err));

  initial begin
    mq = '0; ms = '0; mchk = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 3) != 0);
      late = ($urandom_range(0, 3) == 0);
      d    = ($urandom_range(0, 7) == 0) ? mq : $urandom;
      @(posedge clk);
      mchk = en;
      if (en) begin
        if (!late) mq = d;
        ms = d;
      end
      #1;
      checks++;
      if (q !== mq || sq !== ms || err !== (mchk && mq != ms)) begin
        failures++;
        $display("FAIL cycle %0d: q=%h/%h sq=%h/%h err=%b/%b", i, q, mq, sq, ms, err, mchk && mq != ms);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
