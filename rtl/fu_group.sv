// fu_group: one group of functional units that share a cycle time.
//
// The source design puts every FU with the same cycle time into one group
// whose members share a common output register. Because at most one
// instruction is issued per clock and all members take the same number of
// cycles, two members can never finish in the same cycle, so one output
// register and one register-file write port per group suffice.
//
// This module holds, for each of the NFU members, an operand register that is
// loaded when an instruction is issued to that member and then held while the
// (combinational, multicycle) FU computes. The FUs themselves sit outside and
// return their results on fu_result. A DELAY-deep tracker records which
// member and destination register each issued instruction has; DELAY clocks
// after issue the member's result is captured in the common output register,
// which drives the register file write port for one cycle (wb_valid).
//
// Timing: issue in cycle t (operands loaded at the end of t); result captured
// at the end of cycle t+DELAY; wb_valid/wb_rd/wb_data are valid in cycle
// t+DELAY+1, when the register file writes them. A member is busy in cycles
// t+1 .. t+DELAY-1 and may take a new instruction from cycle t+DELAY on
// (busy is never set when DELAY = 1). The issuer must not send an
// instruction to a busy member; an assertion checks this.
module fu_group
  import lpalu_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned NFU   = 1,
  parameter int unsigned DELAY = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // issue side (from the control unit and the register file read ports)
  input  logic                issue,
  input  logic [FW-1:0]       issue_fu,
  input  logic [1:0]          issue_func,
  input  reg_idx_t            issue_rd,
  input  logic [W-1:0]        issue_a,
  input  logic [W-1:0]        issue_b,
  // member FUs
  output logic [NFU-1:0][W-1:0] fu_a,
  output logic [NFU-1:0][W-1:0] fu_b,
  output logic [NFU-1:0][1:0]   fu_func,
  input  logic [NFU-1:0][W-1:0] fu_result,
  output logic [NFU-1:0]        busy,
  // common output register -> register file write port
  output logic                wb_valid,
  output reg_idx_t            wb_rd,
  output logic [W-1:0]        wb_data
);
  track_t trk [DELAY];

  // Operand registers, one per member; loaded only on issue to that member.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fu_a    <= '0;
      fu_b    <= '0;
      fu_func <= '0;
    end else if (issue) begin
      for (int unsigned k = 0; k < NFU; k++) begin
        if (issue_fu == FW'(k)) begin
          fu_a[k]    <= issue_a;
          fu_b[k]    <= issue_b;
          fu_func[k] <= issue_func;
        end
      end
    end
  end

  // Completion tracker: trk[i] is the instruction issued i+1 cycles ago.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DELAY; i++) trk[i] <= '0;
    end else begin
      trk[0] <= '{valid: issue, fu: issue_fu, rd: issue_rd};
      for (int unsigned i = 1; i < DELAY; i++) trk[i] <= trk[i-1];
    end
  end

  // Common output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= trk[DELAY-1].valid;
      if (trk[DELAY-1].valid) begin
        wb_rd <= trk[DELAY-1].rd;
        for (int unsigned k = 0; k < NFU; k++)
          if (trk[DELAY-1].fu == FW'(k)) wb_data <= fu_result[k];
      end
    end
  end

  // Member k is busy while an instruction it holds has not reached the last
  // tracker stage.
  always_comb begin
    busy = '0;
    for (int unsigned i = 0; i + 1 < DELAY; i++)
      for (int unsigned k = 0; k < NFU; k++)
        if (trk[i].valid && trk[i].fu == FW'(k)) busy[k] = 1'b1;
  end

  // The issuer keeps to the rules: a valid member and no busy member.
  a_issue_fu_valid: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> int'(issue_fu) < NFU)
    else $error("fu_group: issue to FU %0d of %0d", issue_fu, NFU);
  a_issue_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (busy & (NFU'(1) << issue_fu)) == '0)
    else $error("fu_group: issue to busy FU %0d", issue_fu);
endmodule
