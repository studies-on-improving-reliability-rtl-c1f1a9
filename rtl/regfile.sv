// regfile: general-purpose register file of the execution cluster.
//
// NUM_REGS registers of DATA_W bits (32 registers as in the evaluated
// processor). Each of the three lanes reads three operands per cycle (rs1,
// rs2 and rd, the last for multiply-accumulate), so there are nine
// asynchronous read ports, and each lane writes one result per cycle through
// its own write port. A read of a register that is written in the same cycle
// returns the new value (write-through), which is how the issue stage sees a
// result retiring in that cycle. If two lanes write the same register in one
// cycle the highest lane wins; well-formed VLIW groups never do this.
// Port counts, write-through and reset to zero are this design's choices.
module regfile #(
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned RPORTS   = 9,
  parameter int unsigned WPORTS   = 3,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [RPORTS-1:0][AW-1:0]     raddr,
  output logic [RPORTS-1:0][DATA_W-1:0] rdata,
  input  logic [WPORTS-1:0]             we,
  input  logic [WPORTS-1:0][AW-1:0]     waddr,
  input  logic [WPORTS-1:0][DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < WPORTS; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int p = 0; p < RPORTS; p++) begin
      rdata[p] = regs[raddr[p]];
      for (int w = 0; w < WPORTS; w++)
        if (we[w] && waddr[w] == raddr[p]) rdata[p] = wdata[w];
    end
  end

endmodule
