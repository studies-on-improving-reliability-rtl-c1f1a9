// Testbench of rp_alu: every operation type with random and corner operands
// against the reference model.
module tb_rp_alu;
  import rp_pkg::*;
  import tb_rp_model_pkg::*;
  logic [7:0] op;
  logic [31:0] a, b, c, y, want;
  int checks = 0, failures = 0;
  rp_alu #(.DATA_W(32)) dut (.op(op), .a(a), .b(b), .c(c), .y(y));
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [15:0] imm;
      op  = OPS[i % 14];
      a   = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      imm = 16'($urandom);
      b   = op_has_imm(op) ? {{16{imm[15]}}, imm} : ((i % 5 == 0) ? 32'hFFFF_FFFF : $urandom);
      c   = $urandom;
      #1;
      want = ref_op(op, a, b, c, imm);
      checks++;
      if (y !== want) begin
        failures++;
        $display("FAIL op=%h a=%h b=%h c=%h y=%h want=%h", op, a, b, c, y, want);
      end
    end
    op = 8'hFF; #1; checks++; if (y !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
