// rp_mapper: decode-stage selection between Parallel and Redundant mode.
//
// For the instruction group being decoded it looks up the DCF of each valid
// operation in the DCF table (dcf_lut, inside this block), takes the largest
// as the DCF of the group, and compares it with the current threshold DCF_th:
// a group whose DCF exceeds DCF_th runs in R_mode (each operation on the
// P-PIPE and one R-PIPE), otherwise in P_mode (up to three operations in
// parallel). It also reports the number of operations in the group, which the
// threshold tuner uses as the group's issue rate (IPC).
//
// The decision itself (DCF > DCF_th gives R_mode) follows the document. Using
// the maximum over the group's operations as the group DCF is this design's
// choice. The mode output is combinational on the group and on dcf_th; the
// table write port updates the table at the next edge.
module rp_mapper
  import rp_pkg::*;
#(
  parameter int unsigned DCF_ENTRIES = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  slot_t [LANES-1:0]                 grp,
  input  logic [DCF_TH_W-1:0]               dcf_th,
  input  logic                              lut_we,
  input  logic [$clog2(DCF_ENTRIES)-1:0]    lut_waddr,
  input  logic [DCF_W-1:0]                  lut_wdata,
  output mode_e                             mode,
  output logic [DCF_W-1:0]                  grp_dcf,
  output logic [1:0]                        ipc
);

  localparam int unsigned AW = $clog2(DCF_ENTRIES);

  logic [LANES-1:0][AW-1:0]    raddr;
  logic [LANES-1:0][DCF_W-1:0] rdata;

  always_comb begin
    for (int s = 0; s < LANES; s++) raddr[s] = AW'(grp[s].op);
  end

  dcf_lut #(.ENTRIES(DCF_ENTRIES), .W(DCF_W), .RPORTS(LANES)) u_lut (
    .clk(clk), .rst_n(rst_n), .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(raddr), .rdata(rdata)
  );

  always_comb begin
    grp_dcf = '0;
    ipc     = '0;
    for (int s = 0; s < LANES; s++) begin
      if (grp[s].valid) begin
        ipc = ipc + 2'd1;
        if (rdata[s] > grp_dcf) grp_dcf = rdata[s];
      end
    end
    mode = (DCF_TH_W'(grp_dcf) > dcf_th) ? R_MODE : P_MODE;
  end

endmodule
