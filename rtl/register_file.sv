// register_file: multi-port register file of the ALU pipeline.
//
// NREG registers of W bits with
//   * two combinational read ports (Reg1, Reg2) for the operands of the
//     instruction being issued,
//   * NWP synchronous write ports, one per FU group, because instructions
//     finish out of order and several may write back in the same cycle,
//   * an In/Out port towards the data cache: one combinational read port and
//     one synchronous write port.
// Writes take effect at the rising clock edge; a read in the same cycle still
// returns the old value (no write-through). If several ports write one
// register in the same cycle the highest-numbered group port wins and the
// In/Out port has the lowest priority; the control unit never lets two groups
// write the same register in one cycle. All registers reset to zero.
// The multiple write ports and the two read ports follow the source design;
// the sizes, priorities and reset value are this design's choices.
module register_file
  import lpalu_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned NWP = NGROUP
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // operand read ports
  input  reg_idx_t              raddr1,
  input  reg_idx_t              raddr2,
  output logic [W-1:0]          rdata1,
  output logic [W-1:0]          rdata2,
  // write ports, one per FU group
  input  logic [NWP-1:0]        we,
  input  reg_idx_t [NWP-1:0]    waddr,
  input  logic [NWP-1:0][W-1:0] wdata,
  // In/Out port to the data cache
  input  logic                  io_we,
  input  reg_idx_t              io_waddr,
  input  logic [W-1:0]          io_wdata,
  input  reg_idx_t              io_raddr,
  output logic [W-1:0]          io_rdata
);
  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      if (io_we) regs[io_waddr] <= io_wdata;
      for (int unsigned p = 0; p < NWP; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  assign rdata1   = regs[raddr1];
  assign rdata2   = regs[raddr2];
  assign io_rdata = regs[io_raddr];
endmodule
