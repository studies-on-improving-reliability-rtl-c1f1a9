// p_pipe_ex: EX stage of the primary pipeline (P-PIPE).
//
// The operation is computed in a single cycle and captured in a Razor
// register, so the result is fast but exposed to setup errors when the supply
// voltage is scaled down aggressively. The P-PIPE runs at full rate in both
// Parallel and Redundant mode.
//
// Interface: en marks a valid operation in EX this cycle; op, a (rs1), b (rs2)
// and c (old rd) are the forwarded operands; late stands for the physical
// setup violation of this cycle's result (see razor_ff). q, shadow_q and err
// are valid in the following cycle (the write-back stage).
// Single-cycle execution into a Razor register follows the document.
module p_pipe_ex
  import rp_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [OP_W-1:0]   op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  input  logic              late,
  output logic [DATA_W-1:0] q,
  output logic [DATA_W-1:0] shadow_q,
  output logic              err
);

  logic [DATA_W-1:0] y;

  rp_alu #(.DATA_W(DATA_W)) u_alu (.op(op), .a(a), .b(b), .c(c), .y(y));

  razor_ff #(.WIDTH(DATA_W)) u_razor (
    .clk(clk), .rst_n(rst_n), .en(en), .d(y), .late(late),
    .q(q), .shadow_q(shadow_q), .err(err)
  );

endmodule
