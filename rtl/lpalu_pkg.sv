// lpalu_pkg: shared types and constants of the low-power ALU pipeline.
//
// The ALU holds several functional units (FUs) for the same arithmetic
// function, a fast one and a slow, low-power one, and every FU has its own
// machine code. FUs with the same cycle time form a group that shares one
// output register and one register-file write port. This package fixes the
// instruction format, the opcodes, the group layout and the routing of each
// opcode to a (group, FU) pair.
//
// Instruction word (32 bits, this design's own encoding):
//   [31:26] opcode   [25:21] rd   [20:16] rs1   [15:11] rs2   [10:0] zero
// Every instruction has two source registers and one destination, which is
// the generic three-operand form the scheduler works on.
//
// Group layout (cycle times are module parameters of the top; the defaults
// assume a 5 ns clock and round the data-arrival times of the fast and slow
// units up to whole cycles):
//   group 0: fast adder, fast subtractor, logic unit   (1 cycle)
//   group 1: fast multiplier                           (2 cycles)
//   group 2: slow adder, slow subtractor               (3 cycles)
//   group 3: slow multiplier                           (6 cycles)
//   group 4: fast divider                              (7 cycles)
//   group 5: slow divider                              (11 cycles)
package lpalu_pkg;

  localparam int unsigned NREG    = 32;  // architectural registers
  localparam int unsigned RAW     = 5;   // register index width
  localparam int unsigned NGROUP  = 6;   // FU groups = write ports of the register file
  localparam int unsigned MAX_FU  = 3;   // most FUs in one group
  localparam int unsigned GW      = 3;   // group index width
  localparam int unsigned FW      = 2;   // FU index width inside a group

  typedef logic [RAW-1:0] reg_idx_t;

  // One machine code per FU: the scheduler selects the fast or the slow
  // unit by choosing the code.
  typedef enum logic [5:0] {
    OP_NOP   = 6'h00,
    OP_AND   = 6'h01,
    OP_OR    = 6'h02,
    OP_XOR   = 6'h03,
    OP_MOV   = 6'h04,
    OP_ADD_F = 6'h08,
    OP_ADD_S = 6'h09,
    OP_SUB_F = 6'h0A,
    OP_SUB_S = 6'h0B,
    OP_MUL_F = 6'h0C,
    OP_MUL_S = 6'h0D,
    OP_DIV_F = 6'h0E,
    OP_DIV_S = 6'h0F
  } opcode_e;

  // Group numbers
  localparam logic [GW-1:0] G_FAST_ADDSUB = 3'd0;
  localparam logic [GW-1:0] G_FAST_MUL    = 3'd1;
  localparam logic [GW-1:0] G_SLOW_ADDSUB = 3'd2;
  localparam logic [GW-1:0] G_SLOW_MUL    = 3'd3;
  localparam logic [GW-1:0] G_FAST_DIV    = 3'd4;
  localparam logic [GW-1:0] G_SLOW_DIV    = 3'd5;

  // Logic unit functions
  typedef enum logic [1:0] {
    LF_AND = 2'd0,
    LF_OR  = 2'd1,
    LF_XOR = 2'd2,
    LF_MOV = 2'd3
  } logic_func_e;

  // Decoded instruction as seen by the control unit
  typedef struct packed {
    logic        valid;    // an instruction is present
    logic        nop;      // no operation (also used for unknown opcodes)
    logic        illegal;  // opcode not in opcode_e
    opcode_e     op;
    logic [GW-1:0] group;  // FU group that executes it
    logic [FW-1:0] fu;     // FU inside that group
    logic [1:0]  func;     // sub-function (logic unit only)
    reg_idx_t    rd;
    reg_idx_t    rs1;
    reg_idx_t    rs2;
  } dec_t;

  // Entry of a group's completion tracker
  typedef struct packed {
    logic          valid;
    logic [FW-1:0] fu;
    reg_idx_t      rd;
  } track_t;

  // Builds an instruction word (used by testbenches and assemblers).
  function automatic logic [31:0] encode(opcode_e op, reg_idx_t rd, reg_idx_t rs1, reg_idx_t rs2);
    return {op, rd, rs1, rs2, 11'd0};
  endfunction

endpackage
