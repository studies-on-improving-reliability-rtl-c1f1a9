// Testbench of error_rate_sampler at its default 10000-operation window:
// random operation and error counts per cycle; every published ERR_setup
// must equal the errors counted by a model over the same window, and a
// window must close exactly when the model's operation count reaches 10000.
module tb_error_rate_sampler;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ops_in = '0, errs_in = '0;
  logic [15:0] err_setup;
  logic upd;
  int checks = 0, failures = 0, windows = 0;
  error_rate_sampler dut (.clk(clk), .rst_n(rst_n), .ops_in(ops_in), .errs_in(errs_in), .err_setup(err_setup), .upd(upd));
  initial begin
    int mo, me, pct;
    bit expect_upd;
    int want;
    mo = 0; me = 0; expect_upd = 0; want = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      pct = (i / 15000) * 3;   // error rate grows across the run
      ops_in = 2'($urandom_range(0, 3));
      errs_in = '0;
      for (int k = 0; k < int'(ops_in); k++) if ($urandom_range(0, 99) < pct) errs_in++;
      #1;
      if (expect_upd) begin
        checks++;
        if (!upd || err_setup != 16'(want)) begin failures++; $display("FAIL window: upd=%b err=%0d want %0d", upd, err_setup, want); end
        windows++;
      end else begin
        checks++;
        if (upd) begin failures++; $display("FAIL unexpected update"); end
      end
      @(posedge clk);
      expect_upd = 0;
      if (mo + int'(ops_in) >= 10000) begin
        want = me + int'(errs_in); mo = 0; me = 0; expect_upd = 1;
      end else begin
        mo += int'(ops_in); me += int'(errs_in);
      end
    end
    checks++;
    if (windows < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
