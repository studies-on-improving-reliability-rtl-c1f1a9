// recovery_ctrl: reaction of the cluster to a Razor setup error.
//
// It looks at the packet in the write-back stage, whose Razor registers report
// their errors in this cycle, and decides how to recover:
//
//  * R_mode packet, P-PIPE error: the R-PIPE that runs the same operation
//    delivers its two-cycle, error-free result one cycle later. fix is raised
//    for this cycle: write-back waits, the packet in EX is held and executes
//    again in the next cycle (a one-cycle bubble), and in that next cycle
//    (fix_q = 1) write-back takes the R-PIPE result and the bypass network
//    forwards it to the re-executed operation and to its R-PIPE.
//  * P_mode packet, error in any lane: conventional Razor recovery. flush is
//    raised, the write-back and EX packets are discarded and replayed, and
//    issue is blocked so that the replayed packet re-enters EX N_DEPTH cycles
//    after it first did, the refill penalty of an N_DEPTH-stage pipeline.
//
// issue_block is high in the error cycle and in the following N_DEPTH-3
// cycles after a flush; the issue stage adds its own one-cycle issue-to-EX
// delay, so the total cost of a flush is N_DEPTH cycles and of a fix one cycle.
// Both recoveries and their penalties follow the document; the exact
// cycle-level sequencing is this design's choice.
module recovery_ctrl
  import rp_pkg::*;
#(
  parameter int unsigned N_DEPTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wb_valid,   // a packet is in write-back and not being fixed
  input  mode_e            wb_mode,
  input  logic [LANES-1:0] wb_err,     // Razor errors of the lanes this packet used
  output logic             fix,        // R_mode error: bubble now, substitute next cycle
  output logic             fix_q,      // substitution cycle
  output logic             flush,      // P_mode error: discard and replay
  output logic             issue_block
);

  localparam int unsigned CNT_W = $clog2(N_DEPTH + 1);

  logic [CNT_W-1:0] wait_cnt;
  logic             any_err;

  assign any_err = wb_valid && (wb_err != '0);
  assign fix     = any_err && (wb_mode == R_MODE);
  assign flush   = any_err && (wb_mode == P_MODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fix_q    <= 1'b0;
      wait_cnt <= '0;
    end else begin
      fix_q <= fix;
      if (flush)               wait_cnt <= CNT_W'(N_DEPTH - 3);
      else if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
    end
  end

  assign issue_block = fix || flush || (wait_cnt != '0);

  // An R_mode error only concerns the P-PIPE: the R-PIPEs are not checked.
  a_r_err_lane0: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wb_valid && wb_mode == R_MODE) |-> (wb_err[LANES-1:1] == '0));

  initial begin
    if (N_DEPTH < 3) $error("recovery_ctrl: N_DEPTH must be at least 3");
  end

endmodule
