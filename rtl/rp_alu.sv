// rp_alu: execution unit of one lane.
//
// Purely combinational. It implements the operation types whose delay and DCF
// the document tabulates (MUL_ADD, MUL, ADD, ASR) and the other common integer
// operations of a VLIW media processor (SUB, logic, shifts, compare, move).
// MUL_ADD accumulates into the destination register, so the unit takes a
// third operand c (the old value of rd). SETI and ADDI take the slot's
// immediate, sign-extended by the issue logic, as b. Shift amounts use the low five bits
// of b. Unknown operation types give zero. The operation set beyond the four
// tabulated ones and the encodings are this design's choice.
//
// Interface: op selects the operation; a = rs1, b = rs2, c = rd; y = result.
module rp_alu
  import rp_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [OP_W-1:0]   op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  output logic [DATA_W-1:0] y
);

  localparam int unsigned SH_W = $clog2(DATA_W);

  logic [SH_W-1:0]   sh;
  logic [DATA_W-1:0] prod;

  assign sh   = b[SH_W-1:0];
  assign prod = a * b;

  always_comb begin
    unique case (op)
      OP_ADD:    y = a + b;
      OP_SUB:    y = a - b;
      OP_AND:    y = a & b;
      OP_OR:     y = a | b;
      OP_XOR:    y = a ^ b;
      OP_LSL:    y = a << sh;
      OP_LSR:    y = a >> sh;
      OP_ASR:    y = DATA_W'($signed(a) >>> sh);
      OP_CMPLT:  y = DATA_W'($signed(a) < $signed(b));
      OP_MOV:    y = a;
      OP_SETI:   y = b;
      OP_ADDI:   y = a + b;
      OP_MUL:    y = prod;
      OP_MULADD: y = c + prod;
      default:   y = '0;
    endcase
  end

endmodule
