// lp_alu_top: low-power ALU pipeline with duplicated fast and slow
// functional units.
//
// Each arithmetic function (add, subtract, multiply, divide) has a fast unit
// and a slow, low-energy unit with a machine code of its own. An offline
// scheduler picks the slow code wherever the next dependent instruction is
// far enough away that the longer latency costs no stall. FUs of equal cycle
// time form a group with one common output register; each group has its own
// write port into the register file, since results finish out of order and
// several may be written back in the same cycle.
//
// Stages: instruction fetch port -> issue stage (decoder, register file read,
// control unit) -> execute in the FU for the group's cycle time -> group
// output register -> register file write.
// Latency: an instruction issued in cycle t with group cycle time D is written
// back at the end of cycle t+D+1; an instruction that reads its result can
// issue in cycle t+D+2 at the earliest (no forwarding).
//
// Groups and default cycle times (5 ns clock assumed, data arrival of each
// unit rounded up to whole cycles):
//   0  fast add, fast sub, logic unit   CYC_FAST_ADDSUB = 1
//   1  fast multiply                    CYC_FAST_MUL    = 2
//   2  slow add, slow sub               CYC_SLOW_ADDSUB = 3
//   3  slow multiply                    CYC_SLOW_MUL    = 6
//   4  fast divide                      CYC_FAST_DIV    = 7
//   5  slow divide                      CYC_SLOW_DIV    = 11
//
// Ports: a valid/ready instruction fetch port (instruction cache side), the
// register file In/Out port (data cache side: one write, one read), and
// status outputs (issue and write-back per group, stall reasons, idle).
// The organisation follows the source design; the clock period, the cycle
// counts derived from it, the instruction set, the interlock and the absence
// of forwarding are this design's own.
module lp_alu_top
  import lpalu_pkg::*;
#(
  parameter int unsigned W               = 32,
  parameter int unsigned CYC_FAST_ADDSUB = 1,
  parameter int unsigned CYC_FAST_MUL    = 2,
  parameter int unsigned CYC_SLOW_ADDSUB = 3,
  parameter int unsigned CYC_SLOW_MUL    = 6,
  parameter int unsigned CYC_FAST_DIV    = 7,
  parameter int unsigned CYC_SLOW_DIV    = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction fetch port
  input  logic              instr_valid,
  input  logic [31:0]       instr,
  output logic              instr_ready,
  // register file In/Out port (data cache side)
  input  logic              dc_we,
  input  reg_idx_t          dc_waddr,
  input  logic [W-1:0]      dc_wdata,
  input  reg_idx_t          dc_raddr,
  output logic [W-1:0]      dc_rdata,
  // status
  output logic [NGROUP-1:0] issued,
  output logic [NGROUP-1:0] wrote_back,
  output logic              retired_nop,
  output logic              stall_raw,
  output logic              stall_waw,
  output logic              stall_busy,
  output logic              idle
);
  // ---------------- issue stage register ----------------
  logic        id_valid;
  logic [31:0] id_instr;
  logic        accept;
  dec_t        dec;

  assign instr_ready = !id_valid || accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_instr <= '0;
    end else if (instr_ready) begin
      id_valid <= instr_valid;
      id_instr <= instr;
    end
  end

  decoder u_dec (.valid(id_valid), .instr(id_instr), .dec(dec));

  // ---------------- control unit and register file ----------------
  logic [NGROUP-1:0][MAX_FU-1:0] busy;
  logic [NGROUP-1:0]             wb_valid;
  reg_idx_t [NGROUP-1:0]         wb_rd;
  logic [NGROUP-1:0][W-1:0]      wb_data;
  logic [NGROUP-1:0]             issue;
  logic [FW-1:0]                 issue_fu;
  logic [1:0]                    issue_func;
  reg_idx_t                      issue_rd;
  reg_idx_t                      raddr1, raddr2;
  logic [W-1:0]                  opa, opb;

  control_unit u_cu (
    .clk, .rst_n, .dec, .busy, .wb_valid, .wb_rd,
    .raddr1, .raddr2, .issue, .issue_fu, .issue_func, .issue_rd,
    .accept, .stall_raw, .stall_waw, .stall_busy, .idle
  );

  register_file #(.W(W), .NWP(NGROUP)) u_rf (
    .clk, .rst_n,
    .raddr1, .raddr2, .rdata1(opa), .rdata2(opb),
    .we(wb_valid), .waddr(wb_rd), .wdata(wb_data),
    .io_we(dc_we), .io_waddr(dc_waddr), .io_wdata(dc_wdata),
    .io_raddr(dc_raddr), .io_rdata(dc_rdata)
  );

  assign issued      = issue;
  assign wrote_back  = wb_valid;
  assign retired_nop = accept && dec.nop;

  // ---------------- group 0: fast add, fast sub, logic (3 FUs) ----------------
  logic [2:0][W-1:0] g0_a, g0_b, g0_y;
  logic [2:0][1:0]   g0_f;
  logic [2:0]        g0_busy;

  fu_group #(.W(W), .NFU(3), .DELAY(CYC_FAST_ADDSUB)) u_g0 (
    .clk, .rst_n, .issue(issue[G_FAST_ADDSUB]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g0_a), .fu_b(g0_b), .fu_func(g0_f),
    .fu_result(g0_y), .busy(g0_busy),
    .wb_valid(wb_valid[G_FAST_ADDSUB]), .wb_rd(wb_rd[G_FAST_ADDSUB]), .wb_data(wb_data[G_FAST_ADDSUB])
  );
  prefix_adder #(.W(W), .SUBTRACT(1'b0)) u_add_fast (.a(g0_a[0]), .b(g0_b[0]), .y(g0_y[0]));
  prefix_adder #(.W(W), .SUBTRACT(1'b1)) u_sub_fast (.a(g0_a[1]), .b(g0_b[1]), .y(g0_y[1]));
  logic_unit   #(.W(W))                  u_logic    (.a(g0_a[2]), .b(g0_b[2]), .func(g0_f[2]), .y(g0_y[2]));
  assign busy[G_FAST_ADDSUB] = g0_busy;

  // ---------------- group 1: fast multiply ----------------
  logic [0:0][W-1:0] g1_a, g1_b, g1_y;
  logic [0:0][1:0]   g1_f;
  logic [0:0]        g1_busy;

  fu_group #(.W(W), .NFU(1), .DELAY(CYC_FAST_MUL)) u_g1 (
    .clk, .rst_n, .issue(issue[G_FAST_MUL]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g1_a), .fu_b(g1_b), .fu_func(g1_f),
    .fu_result(g1_y), .busy(g1_busy),
    .wb_valid(wb_valid[G_FAST_MUL]), .wb_rd(wb_rd[G_FAST_MUL]), .wb_data(wb_data[G_FAST_MUL])
  );
  multiplier_fast #(.W(W)) u_mul_fast (.a(g1_a[0]), .b(g1_b[0]), .y(g1_y[0]));
  assign busy[G_FAST_MUL] = {2'b00, g1_busy};

  // ---------------- group 2: slow add, slow sub ----------------
  logic [1:0][W-1:0] g2_a, g2_b, g2_y;
  logic [1:0][1:0]   g2_f;
  logic [1:0]        g2_busy;

  fu_group #(.W(W), .NFU(2), .DELAY(CYC_SLOW_ADDSUB)) u_g2 (
    .clk, .rst_n, .issue(issue[G_SLOW_ADDSUB]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g2_a), .fu_b(g2_b), .fu_func(g2_f),
    .fu_result(g2_y), .busy(g2_busy),
    .wb_valid(wb_valid[G_SLOW_ADDSUB]), .wb_rd(wb_rd[G_SLOW_ADDSUB]), .wb_data(wb_data[G_SLOW_ADDSUB])
  );
  ripple_adder #(.W(W), .SUBTRACT(1'b0)) u_add_slow (.a(g2_a[0]), .b(g2_b[0]), .y(g2_y[0]));
  ripple_adder #(.W(W), .SUBTRACT(1'b1)) u_sub_slow (.a(g2_a[1]), .b(g2_b[1]), .y(g2_y[1]));
  assign busy[G_SLOW_ADDSUB] = {1'b0, g2_busy};

  // ---------------- group 3: slow multiply ----------------
  logic [0:0][W-1:0] g3_a, g3_b, g3_y;
  logic [0:0][1:0]   g3_f;
  logic [0:0]        g3_busy;

  fu_group #(.W(W), .NFU(1), .DELAY(CYC_SLOW_MUL)) u_g3 (
    .clk, .rst_n, .issue(issue[G_SLOW_MUL]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g3_a), .fu_b(g3_b), .fu_func(g3_f),
    .fu_result(g3_y), .busy(g3_busy),
    .wb_valid(wb_valid[G_SLOW_MUL]), .wb_rd(wb_rd[G_SLOW_MUL]), .wb_data(wb_data[G_SLOW_MUL])
  );
  multiplier_slow #(.W(W)) u_mul_slow (.a(g3_a[0]), .b(g3_b[0]), .y(g3_y[0]));
  assign busy[G_SLOW_MUL] = {2'b00, g3_busy};

  // ---------------- group 4: fast divide ----------------
  logic [0:0][W-1:0] g4_a, g4_b, g4_y;
  logic [0:0][1:0]   g4_f;
  logic [0:0]        g4_busy;

  fu_group #(.W(W), .NFU(1), .DELAY(CYC_FAST_DIV)) u_g4 (
    .clk, .rst_n, .issue(issue[G_FAST_DIV]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g4_a), .fu_b(g4_b), .fu_func(g4_f),
    .fu_result(g4_y), .busy(g4_busy),
    .wb_valid(wb_valid[G_FAST_DIV]), .wb_rd(wb_rd[G_FAST_DIV]), .wb_data(wb_data[G_FAST_DIV])
  );
  divider_fast #(.W(W)) u_div_fast (.a(g4_a[0]), .b(g4_b[0]), .q(g4_y[0]));
  assign busy[G_FAST_DIV] = {2'b00, g4_busy};

  // ---------------- group 5: slow divide ----------------
  logic [0:0][W-1:0] g5_a, g5_b, g5_y;
  logic [0:0][1:0]   g5_f;
  logic [0:0]        g5_busy;

  fu_group #(.W(W), .NFU(1), .DELAY(CYC_SLOW_DIV)) u_g5 (
    .clk, .rst_n, .issue(issue[G_SLOW_DIV]), .issue_fu, .issue_func, .issue_rd,
    .issue_a(opa), .issue_b(opb), .fu_a(g5_a), .fu_b(g5_b), .fu_func(g5_f),
    .fu_result(g5_y), .busy(g5_busy),
    .wb_valid(wb_valid[G_SLOW_DIV]), .wb_rd(wb_rd[G_SLOW_DIV]), .wb_data(wb_data[G_SLOW_DIV])
  );
  divider_slow #(.W(W)) u_div_slow (.a(g5_a[0]), .b(g5_b[0]), .q(g5_y[0]));
  assign busy[G_SLOW_DIV] = {2'b00, g5_busy};
endmodule
