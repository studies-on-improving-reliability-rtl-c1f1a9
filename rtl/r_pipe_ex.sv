// r_pipe_ex: EX stage of a redundant pipeline (R-PIPE).
//
// Parallel mode (par_en): the lane is an ordinary third/second issue slot. It
// executes in one cycle into a Razor register, exactly like the P-PIPE, and
// its errors trigger the normal flush-and-replay recovery.
//
// Redundant mode (r_start): the lane repeats the operation that the P-PIPE
// executes in the same cycle, but is given two cycles for it, so its result is
// free of setup errors. The two cycles are modelled as an operand register
// loaded at the end of the start cycle and a result register r_res loaded at
// the end of the second cycle (clock-enabled pipeline registers, as the
// document describes; the execution path between them is a two-cycle
// multicycle path). r_res is valid in the cycle after that (r_done = 1), which
// is the cycle in which the cluster substitutes it for a failed P-PIPE result.
// Two R-PIPEs started on alternate cycles keep a throughput of one operation
// per cycle between them.
//
// While the lane is in its second redundant cycle (r_busy) its execution unit
// is occupied, so par_en must be low; the issue logic waits for this.
// A new r_start in the second cycle restarts the lane (used when the operation
// is re-executed after a bubble with corrected operands).
module r_pipe_ex
  import rp_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              par_en,
  input  logic              r_start,
  input  logic [OP_W-1:0]   op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  input  logic              late,
  output logic [DATA_W-1:0] q,
  output logic [DATA_W-1:0] shadow_q,
  output logic              err,
  output logic              r_busy,
  output logic [DATA_W-1:0] r_res,
  output logic              r_done
);

  logic [OP_W-1:0]   h_op;
  logic [DATA_W-1:0] h_a, h_b, h_c;
  logic [DATA_W-1:0] y;
  logic [OP_W-1:0]   alu_op;
  logic [DATA_W-1:0] alu_a, alu_b, alu_c;

  // One execution unit, shared by the two modes.
  always_comb begin
    if (r_busy) begin
      alu_op = h_op; alu_a = h_a; alu_b = h_b; alu_c = h_c;
    end else begin
      alu_op = op;   alu_a = a;   alu_b = b;   alu_c = c;
    end
  end

  rp_alu #(.DATA_W(DATA_W)) u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c), .y(y));

  razor_ff #(.WIDTH(DATA_W)) u_razor (
    .clk(clk), .rst_n(rst_n), .en(par_en), .d(y), .late(late),
    .q(q), .shadow_q(shadow_q), .err(err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_op   <= '0;
      h_a    <= '0;
      h_b    <= '0;
      h_c    <= '0;
      r_busy <= 1'b0;
      r_res  <= '0;
      r_done <= 1'b0;
    end else begin
      r_busy <= r_start;
      r_done <= r_busy;
      if (r_start) begin
        h_op <= op; h_a <= a; h_b <= b; h_c <= c;
      end
      if (r_busy) r_res <= y;
    end
  end

  // The execution unit cannot serve a parallel-mode operation while it is in
  // the second cycle of a redundant one.
  a_no_par_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(r_busy && par_en));
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n) !(r_start && par_en));

endmodule
