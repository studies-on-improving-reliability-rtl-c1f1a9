// Testbench of dvs_controller: random window results against a model of the
// three-way rule (down on no error, hold up to the tolerance, up above it),
// the 0.8 V to 1.3 V range and the settle wait. Both ends of the range must
// be reached.
module tb_dvs_controller;
  import rp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic upd = 1'b0;
  logic [ERR_W-1:0] err_setup = '0, err_tol = 16'd5;
  logic [7:0] down_step = 8'd20, up_step = 8'd50;
  logic [23:0] settle_cycles = 24'd3;
  logic [10:0] vdd_mv;
  logic settling;
  logic [31:0] stat_up, stat_down;
  int checks = 0, failures = 0;
  int m_v, m_w, m_up, m_dn, hit_lo, hit_hi;
  dvs_controller dut (.clk(clk), .rst_n(rst_n), .upd(upd), .err_setup(err_setup), .err_tol(err_tol),
    .down_step(down_step), .up_step(up_step), .settle_cycles(settle_cycles), .vdd_mv(vdd_mv),
    .settling(settling), .stat_up(stat_up), .stat_down(stat_down));

  task automatic cyc(input int bias);
    int nv;
    @(negedge clk);
    upd = $urandom_range(0, 3) == 0;
    err_setup = ($urandom_range(0, 99) < bias) ? 16'($urandom_range(1, 20)) : '0;
    if (vdd_mv == 800) hit_lo++;
    if (vdd_mv == 1300) hit_hi++;
    nv = m_v;
    if (m_w != 0) m_w--;
    else if (upd) begin
      if (err_setup == 0) nv = (m_v - int'(down_step) < 800) ? 800 : m_v - int'(down_step);
      else if (err_setup > err_tol) nv = (m_v + int'(up_step) > 1300) ? 1300 : m_v + int'(up_step);
      if (nv != m_v) begin
        if (nv < m_v) m_dn++; else m_up++;
        m_v = nv; m_w = int'(settle_cycles);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(vdd_mv) != m_v || settling != (m_w != 0) || int'(stat_up) != m_up || int'(stat_down) != m_dn) begin
      failures++;
      $display("FAIL t=%0t v %0d/%0d settling %b/%0d", $time, vdd_mv, m_v, settling, m_w);
    end
  endtask

  initial begin
    m_v = 1300; m_w = 0; m_up = 0; m_dn = 0; hit_lo = 0; hit_hi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (800) cyc(0);       // clean: down to 0.8 V
    repeat (800) cyc(100);     // noisy: back to 1.3 V
    for (int k = 0; k < 10; k++) begin
      down_step = 8'($urandom_range(1, 100));
      up_step = 8'($urandom_range(1, 200));
      settle_cycles = 24'($urandom_range(0, 10));
      err_tol = 16'($urandom_range(0, 10));
      repeat (500) cyc($urandom_range(0, 100));
    end
    checks++;
    if (hit_lo == 0 || hit_hi == 0) begin failures++; $display("FAIL range ends not reached"); end
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
