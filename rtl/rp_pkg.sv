// Shared types and constants of the RazorProtector execution cluster.
//
// The cluster executes VLIW instruction groups of up to three operations on
// three pipelines: lane 0 is the primary pipeline (P-PIPE), lanes 1 and 2 are
// the redundant pipelines (R-PIPE even / R-PIPE odd). Operation types index a
// 256-entry Delay Criticality Factor (DCF) table, so they are 8 bits wide.
//
// Number formats used across the cluster:
//   DCF      : 0.1 % units, 0..1000 (100.0 % is the maximum, as in the DCF table)
//   RISK_th  : 0.01 % units, 1..100 (0.01 % .. 1 %)
//   ERR_setup: Razor errors per window of WINDOW_OPS checked operations; with
//              the default window of 10000 this is also 0.01 % units.
//   DCF_th   : 1000 * RISK_th / ERR_setup, so it is in the same 0.1 % units
//              as the DCF table when RISK_th and ERR_setup share a unit.
// The encoding of operation types and these fixed-point formats are choices of
// this design; the document names the operations and gives the ranges.
package rp_pkg;

  localparam int unsigned LANES    = 3;   // one P-PIPE and two R-PIPEs
  localparam int unsigned OP_W     = 8;   // 256 operation types
  localparam int unsigned REG_AW   = 5;   // 32 general-purpose registers
  localparam int unsigned DCF_W    = 10;  // 0.1 % units, up to 1000
  localparam int unsigned DCF_TH_W = 17;  // 1000 * 100 / 1 fits in 17 bits
  localparam int unsigned RISK_W   = 7;   // 0.01 % units, up to 100
  localparam int unsigned ERR_W    = 16;  // errors per sampling window
  localparam int unsigned IMM_W    = 16;  // immediate field of a slot

  localparam logic [RISK_W-1:0] RISK_MIN = 7'd1;    // 0.01 %
  localparam logic [RISK_W-1:0] RISK_MID = 7'd10;   // 0.1 %
  localparam logic [RISK_W-1:0] RISK_MAX = 7'd100;  // 1 %

  typedef enum logic [OP_W-1:0] {
    OP_NOP    = 8'h00,
    OP_ADD    = 8'h01,
    OP_SUB    = 8'h02,
    OP_AND    = 8'h03,
    OP_OR     = 8'h04,
    OP_XOR    = 8'h05,
    OP_LSL    = 8'h06,
    OP_LSR    = 8'h07,
    OP_ASR    = 8'h08,
    OP_CMPLT  = 8'h09,   // signed less-than, result 0 or 1
    OP_MOV    = 8'h0A,   // rd = rs1
    OP_SETI   = 8'h0B,   // rd = sign-extended immediate
    OP_ADDI   = 8'h0C,   // rd = rs1 + sign-extended immediate
    OP_MUL    = 8'h10,
    OP_MULADD = 8'h11    // rd = rd + rs1 * rs2
  } op_e;

  typedef enum logic {P_MODE = 1'b0, R_MODE = 1'b1} mode_e;

  // One operation slot of an instruction group.
  typedef struct packed {
    logic              valid;
    logic [OP_W-1:0]   op;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs1;
    logic [REG_AW-1:0] rs2;
    logic [IMM_W-1:0]  imm;
  } slot_t;

  // Operations whose second operand is the slot's immediate.
  function automatic logic op_has_imm(logic [OP_W-1:0] op);
    return op == OP_SETI || op == OP_ADDI;
  endfunction

  // A packet is what enters the EX stage in one cycle: up to three slots in
  // P_mode, or one slot (in lane 0) in R_mode with its R-PIPE chosen by parity.
  typedef struct packed {
    logic              valid;
    mode_e             mode;
    logic              rlane;     // R_mode: 0 = R-PIPE even (lane 1), 1 = odd (lane 2)
    logic              last;      // last packet of its instruction group
    logic [1:0]        ipc;       // number of operations in the group
    slot_t [LANES-1:0] slot;
  } packet_t;

endpackage
