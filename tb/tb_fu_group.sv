// tb_fu_group: self-checking test of an FU group. Two groups are tested, one
// with two members and a cycle time of 3, one with one member and a cycle time
// of 1. Stand-in FUs (add for member 0, subtract for member 1) are built in
// the testbench. Random instructions are issued to members the testbench's own
// model says are free; every write-back must appear exactly DELAY+1 cycles
// after issue with the right register and data, the busy flags must match the
// model, and every issued instruction must come back.
module tb_fu_group;
  import lpalu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- group A: 2 members, DELAY 3 ----
  localparam int unsigned DA = 3;
  logic            ia;  logic [FW-1:0] ia_fu;  reg_idx_t ia_rd;
  logic [31:0]     ia_a, ia_b;
  logic [1:0][31:0] fa_a, fa_b, fa_y;  logic [1:0][1:0] fa_f;
  logic [1:0]      busy_a;
  logic            wa_v;  reg_idx_t wa_rd;  logic [31:0] wa_d;

  fu_group #(.W(32), .NFU(2), .DELAY(DA)) u_a (
    .clk, .rst_n, .issue(ia), .issue_fu(ia_fu), .issue_func(2'd0), .issue_rd(ia_rd),
    .issue_a(ia_a), .issue_b(ia_b), .fu_a(fa_a), .fu_b(fa_b), .fu_func(fa_f),
    .fu_result(fa_y), .busy(busy_a), .wb_valid(wa_v), .wb_rd(wa_rd), .wb_data(wa_d));
  assign fa_y[0] = fa_a[0] + fa_b[0];
  assign fa_y[1] = fa_a[1] - fa_b[1];

  // ---- group B: 1 member, DELAY 1 ----
  logic            ib;  reg_idx_t ib_rd;  logic [31:0] ib_a, ib_b;
  logic [0:0][31:0] fb_a, fb_b, fb_y;  logic [0:0][1:0] fb_f;
  logic [0:0]      busy_b;
  logic            wb_v;  reg_idx_t wb_rd;  logic [31:0] wb_d;

  fu_group #(.W(32), .NFU(1), .DELAY(1)) u_b (
    .clk, .rst_n, .issue(ib), .issue_fu('0), .issue_func(2'd0), .issue_rd(ib_rd),
    .issue_a(ib_a), .issue_b(ib_b), .fu_a(fb_a), .fu_b(fb_b), .fu_func(fb_f),
    .fu_result(fb_y), .busy(busy_b), .wb_valid(wb_v), .wb_rd(wb_rd), .wb_data(wb_d));
  assign fb_y[0] = fb_a[0] ^ fb_b[0];

  // expected write-backs, indexed by due cycle
  typedef struct { int due; reg_idx_t rd; logic [31:0] d; } exp_t;
  exp_t qa[$], qb[$];
  int   last_issue [2] = '{-100, -100};
  int   issued_a = 0, issued_b = 0, back_a = 0, back_b = 0, busy_seen = 0;

  initial begin
    ia = 0; ib = 0; ia_fu = 0; ia_rd = 0; ia_a = 0; ia_b = 0; ib_rd = 0; ib_a = 0; ib_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      // ---- check write-backs due now ----
      if (wa_v) begin
        checks++;
        if (qa.size() == 0 || qa[0].due != cyc || qa[0].rd != wa_rd || qa[0].d != wa_d) begin
          failures++; $display("A: unexpected wb at %0d rd=%0d d=%h", cyc, wa_rd, wa_d);
        end
        if (qa.size() != 0) void'(qa.pop_front());
        back_a++;
      end else if (qa.size() != 0 && qa[0].due == cyc) begin
        checks++; failures++; $display("A: missing wb at %0d", cyc); void'(qa.pop_front());
      end
      if (wb_v) begin
        checks++;
        if (qb.size() == 0 || qb[0].due != cyc || qb[0].rd != wb_rd || qb[0].d != wb_d) begin
          failures++; $display("B: unexpected wb at %0d", cyc);
        end
        if (qb.size() != 0) void'(qb.pop_front());
        back_b++;
      end else if (qb.size() != 0 && qb[0].due == cyc) begin
        checks++; failures++; $display("B: missing wb at %0d", cyc); void'(qb.pop_front());
      end
      // ---- busy flags against the model ----
      for (int k = 0; k < 2; k++) begin
        logic mb;
        mb = (cyc > last_issue[k]) && (cyc < last_issue[k] + int'(DA));
        checks++;
        if (busy_a[k] != mb) begin failures++; $display("A: busy[%0d]=%b expected %b at %0d", k, busy_a[k], mb, cyc); end
        if (mb) busy_seen++;
      end
      checks++;
      if (busy_b != 1'b0) failures++;
      // ---- new issues ----
      ia = 1'b0;
      if (cyc < 2900 && $urandom_range(3) != 0) begin
        int k;
        k = $urandom_range(1);
        if (!((cyc > last_issue[k]) && (cyc < last_issue[k] + int'(DA)))) begin
          ia = 1'b1; ia_fu = FW'(k); ia_rd = reg_idx_t'($urandom); ia_a = $urandom; ia_b = $urandom;
          last_issue[k] = cyc;
          qa.push_back('{due: cyc + int'(DA) + 1, rd: ia_rd, d: (k == 0) ? ia_a + ia_b : ia_a - ia_b});
          issued_a++;
        end
      end
      ib = (cyc < 2900) && ($urandom_range(1) != 0);
      if (ib) begin
        ib_rd = reg_idx_t'($urandom); ib_a = $urandom; ib_b = $urandom;
        qb.push_back('{due: cyc + 2, rd: ib_rd, d: ib_a ^ ib_b});
        issued_b++;
      end
    end
    checks += 3;
    if (issued_a != back_a || issued_b != back_b) begin
      failures++; $display("issued %0d/%0d returned %0d/%0d", issued_a, issued_b, back_a, back_b);
    end
    if (busy_seen == 0) failures++;
    if (issued_a < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
