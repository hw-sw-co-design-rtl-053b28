// control_unit: single-issue control of the ALU pipeline.
//
// Each cycle it looks at the decoded instruction waiting in the issue stage
// and either issues it to the FU its opcode names, retires it (NOP), or holds
// it (stall). It drives the register file read addresses (Register File
// Control) and the issue signals of the FU groups.
//
// Ordering is left to the offline scheduler, which picks slow FUs only where
// no stall results; when it has to use fast FUs and a dependence is still too
// close, the hardware delays issue. A scoreboard with one pending bit per
// register is set when an instruction that writes the register issues and
// cleared when its group writes it back. The instruction stalls when
//   * a source register is pending              (read after write),
//   * its destination register is pending       (write after write; this also
//     keeps two groups from writing one register in the same cycle),
//   * its FU is still busy with an earlier instruction (structural).
// Operands are read from the register file in the issue cycle, so an earlier
// read never sees a later write. At most one instruction issues per clock.
//
// Interface: dec (from the decoder), busy (per group and FU), wb_valid/wb_rd
// (write-backs of the groups). accept is high in the cycle the waiting
// instruction is issued or retired. idle is high when nothing is in flight.
// The interlock is this design's choice; the source design names stalls and
// delayed issue as the fallback when a hazard remains.
module control_unit
  import lpalu_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  dec_t                          dec,
  input  logic [NGROUP-1:0][MAX_FU-1:0] busy,
  input  logic [NGROUP-1:0]             wb_valid,
  input  reg_idx_t [NGROUP-1:0]         wb_rd,
  // register file control
  output reg_idx_t                      raddr1,
  output reg_idx_t                      raddr2,
  // issue to the FU groups
  output logic [NGROUP-1:0]             issue,
  output logic [FW-1:0]                 issue_fu,
  output logic [1:0]                    issue_func,
  output reg_idx_t                      issue_rd,
  // status
  output logic                          accept,
  output logic                          stall_raw,
  output logic                          stall_waw,
  output logic                          stall_busy,
  output logic                          idle
);
  logic [NREG-1:0] pending;
  logic            go;

  assign raddr1     = dec.rs1;
  assign raddr2     = dec.rs2;
  assign issue_fu   = dec.fu;
  assign issue_func = dec.func;
  assign issue_rd   = dec.rd;

  always_comb begin
    logic hz;
    stall_raw  = 1'b0;
    stall_waw  = 1'b0;
    stall_busy = 1'b0;
    if (dec.valid && !dec.nop) begin
      stall_raw  = pending[dec.rs1] | pending[dec.rs2];
      stall_waw  = pending[dec.rd];
      stall_busy = busy[dec.group][dec.fu];
    end
    hz     = stall_raw | stall_waw | stall_busy;
    go     = dec.valid && !dec.nop && !hz;
    accept = dec.valid && (dec.nop || !hz);
    issue  = '0;
    if (go) issue[dec.group] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
    end else begin
      logic [NREG-1:0] nxt;
      nxt = pending;
      for (int unsigned g = 0; g < NGROUP; g++)
        if (wb_valid[g]) nxt[wb_rd[g]] = 1'b0;
      if (go) nxt[dec.rd] = 1'b1;
      pending <= nxt;
    end
  end

  assign idle = (pending == '0);

  // Two groups never write back the same register in one cycle.
  function automatic bit wb_clash(logic [NGROUP-1:0] v, reg_idx_t [NGROUP-1:0] rd);
    for (int unsigned g = 0; g < NGROUP; g++)
      for (int unsigned h = g + 1; h < NGROUP; h++)
        if (v[g] && v[h] && rd[g] == rd[h]) return 1'b1;
    return 1'b0;
  endfunction

  a_no_wb_clash: assert property (@(posedge clk) disable iff (!rst_n) !wb_clash(wb_valid, wb_rd))
    else $error("control_unit: two groups write one register in the same cycle");
endmodule
