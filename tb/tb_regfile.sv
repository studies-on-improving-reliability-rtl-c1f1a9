// Testbench of regfile: random writes on three ports and reads on nine,
// checked against a model, including same-cycle write-through and the
// highest-lane priority on colliding writes.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [8:0][4:0]  raddr;
  logic [8:0][31:0] rdata;
  logic [2:0]       we;
  logic [2:0][4:0]  waddr;
  logic [2:0][31:0] wdata;
  logic [31:0] m [32];
  int checks = 0, failures = 0;
  regfile #(.NUM_REGS(32), .DATA_W(32), .RPORTS(9), .WPORTS(3)) dut (.clk(clk), .rst_n(rst_n), .raddr(raddr),
    .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));
  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < 32; r++) m[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] e;
      @(negedge clk);
      for (int w = 0; w < 3; w++) begin
        we[w] = $urandom_range(0, 1); waddr[w] = 5'($urandom); wdata[w] = $urandom;
      end
      for (int p = 0; p < 9; p++) raddr[p] = (p < 3) ? waddr[p] : 5'($urandom);
      #1;
      for (int p = 0; p < 9; p++) begin
        e = m[raddr[p]];
        for (int w = 0; w < 3; w++) if (we[w] && waddr[w] == raddr[p]) e = wdata[w];
        checks++;
        if (rdata[p] !== e) begin failures++; $display("FAIL port %0d r%0d=%h want %h", p, raddr[p], rdata[p], e); end
      end
      @(posedge clk);
      for (int w = 0; w < 3; w++) if (we[w]) m[waddr[w]] = wdata[w];
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
