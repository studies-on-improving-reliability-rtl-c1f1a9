// dcf_lut: Delay Criticality Factor table of the decode stage.
//
// ENTRIES entries (256, enough for the fewer than 100 operation types a
// program uses), indexed by operation type, each holding that operation's DCF
// in 0.1 % units. The table is loaded through the write port at the start of a
// program, from circuit-level delay analysis done offline, and read by the
// mode selector on three ports, one per slot of an instruction group.
// Reads are combinational; a write takes effect at the next clock edge.
// After reset the table holds the DCF values the document tabulates for
// MUL_ADD (30.4 %), MUL (22.8 %), ADD (17.4 %) and ASR (16.4 %); every other
// entry is zero until written. The reset contents and the 0.1 % unit are this
// design's choices.
module dcf_lut
  import rp_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned W       = DCF_W,
  parameter int unsigned RPORTS  = 3,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [W-1:0]             wdata,
  input  logic [RPORTS-1:0][AW-1:0] raddr,
  output logic [RPORTS-1:0][W-1:0]  rdata
);

  logic [W-1:0] table_q [ENTRIES];

  function automatic logic [W-1:0] reset_value(int unsigned idx);
    case (idx)
      int'(OP_MULADD): return W'(304);
      int'(OP_MUL):    return W'(228);
      int'(OP_ADD):    return W'(174);
      int'(OP_ASR):    return W'(164);
      default:         return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= reset_value(i);
    end else if (we) begin
      table_q[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < RPORTS; p++) rdata[p] = table_q[raddr[p]];
  end

endmodule
