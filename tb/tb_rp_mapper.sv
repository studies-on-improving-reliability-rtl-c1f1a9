// Testbench of rp_mapper: a DCF table loaded with random values, random
// groups and thresholds; the mode must be R_mode exactly when the largest DCF
// among the group's valid operations exceeds DCF_th, and ipc must count them.
module tb_rp_mapper;
  import rp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  slot_t [2:0] grp = '0;
  logic [16:0] dcf_th = '0;
  logic lut_we = 1'b0;
  logic [7:0] lut_waddr = '0;
  logic [9:0] lut_wdata = '0;
  mode_e mode;
  logic [9:0] grp_dcf;
  logic [1:0] ipc;
  logic [9:0] m [256];
  int checks = 0, failures = 0, n_r = 0, n_p = 0;
  rp_mapper #(.DCF_ENTRIES(256)) dut (.clk(clk), .rst_n(rst_n), .grp(grp), .dcf_th(dcf_th), .lut_we(lut_we),
    .lut_waddr(lut_waddr), .lut_wdata(lut_wdata), .mode(mode), .grp_dcf(grp_dcf), .ipc(ipc));
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_waddr = 8'(i); lut_wdata = 10'($urandom_range(0, 1000)); m[i] = lut_wdata;
    end
    @(negedge clk);
    lut_we = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      logic [9:0] mx;
      int n;
      @(negedge clk);
      mx = '0; n = 0;
      for (int s = 0; s < 3; s++) begin
        grp[s] = '0;
        grp[s].valid = $urandom_range(0, 1);
        grp[s].op = 8'($urandom);
        if (grp[s].valid) begin n++; if (m[grp[s].op] > mx) mx = m[grp[s].op]; end
      end
      dcf_th = 17'($urandom_range(0, 1100));
      #1;
      checks++;
      if (grp_dcf !== mx || ipc !== 2'(n) || mode !== ((17'(mx) > dcf_th) ? R_MODE : P_MODE)) begin
        failures++;
        $display("FAIL dcf=%0d/%0d ipc=%0d/%0d mode=%0d th=%0d", grp_dcf, mx, ipc, n, mode, dcf_th);
      end
      if (mode == R_MODE) n_r++; else n_p++;
    end
    checks++;
    if (n_r == 0 || n_p == 0) failures++;
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
