// Testbench of dcf_th_calc: random RISK_th and ERR_setup; after start the
// divider must be busy for 17 cycles and then hold 1000 * RISK_th / ERR_setup;
// ERR_setup = 0 gives the largest threshold at once. A start while busy must
// be served afterwards with the new inputs.
module tb_dcf_th_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  logic [6:0] risk_th = 7'd10;
  logic [15:0] err_setup = '0;
  logic [16:0] dcf_th;
  logic busy;
  int checks = 0, failures = 0;
  dcf_th_calc dut (.clk(clk), .rst_n(rst_n), .start(start), .risk_th(risk_th), .err_setup(err_setup), .dcf_th(dcf_th), .busy(busy));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [16:0] want;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 chk(dcf_th == '1, "reset threshold is the largest");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      risk_th = 7'($urandom_range(1, 100));
      err_setup = (i % 10 == 0) ? 16'd0 : 16'($urandom_range(1, (i % 3 == 0) ? 65535 : 300));
      want = (err_setup == 0) ? '1 : 17'((32'(risk_th) * 1000) / 32'(err_setup));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (busy) begin lat++; @(negedge clk); end
      chk(dcf_th == want, $sformatf("RISK %0d ERR %0d: DCF_th %0d want %0d", risk_th, err_setup, dcf_th, want));
      chk(lat == ((err_setup == 0) ? 0 : 17), $sformatf("latency %0d", lat));
    end
    // start while busy
    @(negedge clk);
    risk_th = 7'd50; err_setup = 16'd7; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    risk_th = 7'd3; err_setup = 16'd9; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (40) @(negedge clk);
    chk(dcf_th == 17'(3000 / 9), "pending start served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
