// Reference model shared by the testbenches: the result of one operation,
// written independently of the RTL execution unit, and a generator of random
// VLIW groups whose operations are independent of each other.
package tb_rp_model_pkg;
  import rp_pkg::*;

  function automatic logic [31:0] ref_op(logic [7:0] op, logic [31:0] a, logic [31:0] b,
                                         logic [31:0] c, logic [15:0] imm);
    logic [31:0] simm;
    logic signed [63:0] sa;
    simm = {{16{imm[15]}}, imm};
    sa   = $signed(a);
    case (op)
      8'h01: return a + b;
      8'h02: return a + (~b) + 32'd1;
      8'h03: return a & b;
      8'h04: return a | b;
      8'h05: return a ^ b;
      8'h06: return a << b[4:0];
      8'h07: return a >> b[4:0];
      8'h08: return 32'(sa >>> b[4:0]);
      8'h09: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      8'h0A: return a;
      8'h0B: return simm;
      8'h0C: return a + simm;
      8'h10: return 32'(64'(a) * 64'(b));
      8'h11: return c + 32'(64'(a) * 64'(b));
      default: return 32'd0;
    endcase
  endfunction

  localparam logic [7:0] OPS [14] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07,
                                      8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0C, 8'h10, 8'h11};

  // Random group with n operations (1..3) in random slots; destinations are
  // distinct and no source reads a destination of the same group.
  function automatic void rand_group(int n, output slot_t g [3]);
    logic [4:0] dst [3];
    int k;
    for (int s = 0; s < 3; s++) g[s] = '0;
    for (int i = 0; i < 3; i++) begin
      logic ok;
      do begin
        dst[i] = 5'($urandom_range(0, 31));
        ok = 1'b1;
        for (int j = 0; j < i; j++) if (dst[j] == dst[i]) ok = 1'b0;
      end while (!ok);
    end
    k = 0;
    for (int s = 0; s < 3; s++) begin
      if (k < n && ($urandom_range(0, 2) != 0 || (3 - s) <= (n - k))) begin
        logic [4:0] r1, r2;
        do r1 = 5'($urandom_range(0, 31)); while (r1 == dst[0] || r1 == dst[1] || r1 == dst[2]);
        do r2 = 5'($urandom_range(0, 31)); while (r2 == dst[0] || r2 == dst[1] || r2 == dst[2]);
        g[s].valid = 1'b1;
        g[s].op    = OPS[$urandom_range(0, 13)];
        g[s].rd    = dst[k];
        g[s].rs1   = r1;
        g[s].rs2   = r2;
        g[s].imm   = 16'($urandom);
        k++;
      end
    end
  endfunction
endpackage
