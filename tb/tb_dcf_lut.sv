// Testbench of dcf_lut: reset contents (the tabulated DCFs of MUL_ADD, MUL,
// ADD and ASR, zero elsewhere), then random writes and three-port reads.
module tb_dcf_lut;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [7:0] waddr = '0;
  logic [9:0] wdata = '0;
  logic [2:0][7:0] raddr = '0;
  logic [2:0][9:0] rdata;
  logic [9:0] m [256];
  int checks = 0, failures = 0;
  dcf_lut #(.ENTRIES(256), .W(10), .RPORTS(3)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));
  initial begin
    for (int i = 0; i < 256; i++) m[i] = '0;
    m[8'h11] = 10'd304; m[8'h10] = 10'd228; m[8'h01] = 10'd174; m[8'h08] = 10'd164;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i += 3) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) raddr[p] = 8'(i + p);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p]]) begin failures++; $display("FAIL reset entry %0d", raddr[p]); end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 8'($urandom); wdata = 10'($urandom_range(0, 1000));
      for (int p = 0; p < 3; p++) raddr[p] = ($urandom_range(0, 1) == 0) ? waddr : 8'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p]]) begin failures++; $display("FAIL entry %0d", raddr[p]); end
      end
      @(posedge clk);
      if (we) m[waddr] = wdata;
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
