// tb_control_unit: self-checking test of the issue control and scoreboard.
// A directed part walks through a read-after-write stall, a write-after-write
// stall, a busy-FU stall, a NOP and the release of a stall by a write-back.
// A random part then drives random decoded instructions, busy flags and
// write-backs of pending registers, and compares accept, issue and the three
// stall reasons every cycle with a scoreboard model kept in the testbench.
module tb_control_unit;
  import lpalu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  dec_t                          dec;
  logic [NGROUP-1:0][MAX_FU-1:0] busy;
  logic [NGROUP-1:0]             wb_valid;
  reg_idx_t [NGROUP-1:0]         wb_rd;
  reg_idx_t                      raddr1, raddr2, issue_rd;
  logic [NGROUP-1:0]             issue;
  logic [FW-1:0]                 issue_fu;
  logic [1:0]                    issue_func;
  logic                          accept, stall_raw, stall_waw, stall_busy, idle;

  control_unit dut (.*);

  logic [NREG-1:0] pend;   // model
  int n_raw = 0, n_waw = 0, n_busy = 0, n_issue = 0;

  function automatic dec_t mk(opcode_e op, logic [2:0] g, logic [1:0] f, int rd, int r1, int r2);
    dec_t d;
    d = '0; d.valid = 1'b1; d.op = op; d.group = g; d.fu = f;
    d.rd = reg_idx_t'(rd); d.rs1 = reg_idx_t'(r1); d.rs2 = reg_idx_t'(r2);
    d.nop = (op == OP_NOP);
    return d;
  endfunction

  task automatic expect_(string what, logic acc, logic [NGROUP-1:0] iss, logic raw, logic waw, logic bsy);
    #1;
    checks++;
    if (accept !== acc || issue !== iss || stall_raw !== raw || stall_waw !== waw || stall_busy !== bsy ||
        raddr1 !== dec.rs1 || raddr2 !== dec.rs2) begin
      failures++;
      $display("%s: acc %b iss %b raw %b waw %b busy %b", what, accept, issue, stall_raw, stall_waw, stall_busy);
    end
  endtask

  initial begin
    dec = '0; busy = '0; wb_valid = '0; wb_rd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1; checks++; if (!idle) failures++;
    // ---- directed ----
    dec = mk(OP_ADD_S, G_SLOW_ADDSUB, 0, 3, 1, 2);  expect_("issue", 1, 6'b000100, 0, 0, 0);
    @(negedge clk);
    checks++; if (idle) failures++;
    dec = mk(OP_ADD_F, G_FAST_ADDSUB, 0, 4, 3, 1);  expect_("raw", 0, 0, 1, 0, 0);
    dec = mk(OP_SUB_F, G_FAST_ADDSUB, 1, 3, 5, 6);  expect_("waw", 0, 0, 0, 1, 0);
    busy[G_SLOW_ADDSUB][0] = 1'b1;
    dec = mk(OP_ADD_S, G_SLOW_ADDSUB, 0, 7, 1, 2);  expect_("busy", 0, 0, 0, 0, 1);
    @(negedge clk);   // stalled instructions change nothing
    dec = mk(OP_ADD_S, G_SLOW_ADDSUB, 1, 7, 1, 2);  expect_("other fu free", 1, 6'b000100, 0, 0, 0);
    dec.valid = 1'b0;  // withdrawn before the clock edge
    busy = '0;
    dec = mk(OP_NOP, 0, 0, 3, 3, 3);                expect_("nop", 1, 0, 0, 0, 0);
    dec.valid = 1'b0;                               expect_("empty", 0, 0, 0, 0, 0);
    wb_valid[G_SLOW_ADDSUB] = 1'b1; wb_rd[G_SLOW_ADDSUB] = 5'd3;
    @(negedge clk);
    wb_valid = '0;
    dec = mk(OP_ADD_F, G_FAST_ADDSUB, 0, 4, 3, 1);  expect_("released", 1, 6'b000001, 0, 0, 0);
    @(negedge clk);
    dec = mk(OP_MUL_F, G_FAST_MUL, 0, 9, 8, 4);     expect_("raw2", 0, 0, 1, 0, 0);
    wb_valid[G_FAST_ADDSUB] = 1'b1; wb_rd[G_FAST_ADDSUB] = 5'd4;
    dec.valid = 1'b0;
    @(negedge clk);
    wb_valid = '0;
    #1; checks++; if (!idle) begin failures++; $display("not idle after drain"); end

    // ---- random against a scoreboard model ----
    pend = '0;
    repeat (20000) begin
      logic raw, waw, bsy, acc;
      logic [NGROUP-1:0] iss;
      @(negedge clk);
      dec = mk(($urandom_range(9) == 0) ? OP_NOP : OP_ADD_F, 3'($urandom_range(5)), 2'($urandom_range(2)),
               $urandom_range(15), $urandom_range(15), $urandom_range(15));
      dec.valid = ($urandom_range(7) != 0);
      busy = NGROUP*MAX_FU'($urandom) & NGROUP*MAX_FU'($urandom);
      wb_valid = '0;
      for (int g = 0; g < int'(NGROUP); g++) begin
        // retire a pending register not already being retired by another group
        int r;
        r = $urandom_range(15);
        if (pend[r] && $urandom_range(1) == 0) begin
          logic dup;
          dup = 1'b0;
          for (int h = 0; h < g; h++) if (wb_valid[h] && wb_rd[h] == reg_idx_t'(r)) dup = 1'b1;
          if (!dup) begin wb_valid[g] = 1'b1; wb_rd[g] = reg_idx_t'(r); end
        end
      end
      raw = dec.valid && !dec.nop && (pend[dec.rs1] || pend[dec.rs2]);
      waw = dec.valid && !dec.nop && pend[dec.rd];
      bsy = dec.valid && !dec.nop && busy[dec.group][dec.fu];
      acc = dec.valid && (dec.nop || !(raw || waw || bsy));
      iss = '0;
      if (acc && !dec.nop) iss[dec.group] = 1'b1;
      expect_("random", acc, iss, raw, waw, bsy);
      n_raw += int'(raw); n_waw += int'(waw); n_busy += int'(bsy); n_issue += int'(iss != 0);
      for (int g = 0; g < int'(NGROUP); g++) if (wb_valid[g]) pend[wb_rd[g]] = 1'b0;
      if (iss != 0) pend[dec.rd] = 1'b1;
    end
    checks++;
    if (n_raw == 0 || n_waw == 0 || n_busy == 0 || n_issue == 0) failures++;
    $display("random: %0d issues, stalls raw %0d waw %0d busy %0d", n_issue, n_raw, n_waw, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
