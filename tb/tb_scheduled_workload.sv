// tb_scheduled_workload: the hardware/software co-design end to end.
//
// Branch-free code segments are generated in the generic three-operand form,
// passed through a model of the offline scheduler, and the scheduled code is
// run on lp_alu_top at its default parameters.
//
// Scheduler model (in this testbench, not hardware). Every add, sub, mul and
// div starts on its slow unit. The segment is walked in order and each
// instruction is appended to the output. Before an instruction that depends
// on an earlier one is appended, the issue-timing model below is asked
// whether it would stall. If it would, independent instructions (ones that
// share no register with any other instruction of the segment) are pulled
// forward from later in the segment to fill the gap. Whenever an instruction
// (filler or not) would still stall, slow instructions are switched to their
// fast unit, the instruction itself first and then the placed ones latest
// first, as long as that shortens the stall. Independent instructions not used
// as filler are appended where they stood. A last pass enforces the rule
// that a slow unit may cost no cycle: no instruction may issue later than it
// would with every unit fast in the same order. The reordered code is kept
// only if it ends no later than the segment in its given order.
//
// Issue-timing model: single issue, one instruction per cycle at best. An
// instruction issues at the latest of: one cycle after the previous issue;
// D+2 cycles after the issue of the last writer of each of its registers
// (D = that writer's group cycle time; this covers both read-after-write and
// write-after-write); and D cycles after the previous use of its own unit.
//
// Checks: the scheduled code gives the same registers as the original order
// (in-order reference model); the issue cycles seen on the RTL equal the
// model's prediction, for both the original all-fast code and the scheduled
// code; the scheduled code issues its last instruction no later than the
// original all-fast code, so no stall was added. The share of instructions
// put on slow units and the relative energy saving per function are printed.
// Energy per operation, fast/slow in pJ: add 56/23, sub 57/24, mul 703/394,
// div 1218/1049.
module tb_scheduled_workload;
  import lpalu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic              instr_valid, instr_ready;
  logic [31:0]       instr;
  logic              dc_we;
  reg_idx_t          dc_waddr, dc_raddr;
  logic [31:0]       dc_wdata, dc_rdata;
  logic [NGROUP-1:0] issued, wrote_back;
  logic              retired_nop, stall_raw, stall_waw, stall_busy, idle;

  lp_alu_top dut (.*);

  localparam int DLY [NGROUP] = '{1, 2, 3, 6, 7, 11};

  typedef struct { opcode_e op; int rd, rs1, rs2; } ins_t;
  typedef ins_t prog_t [$];

  // ---------------- instruction properties ----------------
  function automatic int group_of(opcode_e op);
    case (op)
      OP_MUL_F: return 1;
      OP_ADD_S, OP_SUB_S: return 2;
      OP_MUL_S: return 3;
      OP_DIV_F: return 4;
      OP_DIV_S: return 5;
      default:  return 0;
    endcase
  endfunction

  // unit number 0..8 (the FU an opcode occupies)
  function automatic int unit_of(opcode_e op);
    case (op)
      OP_ADD_F: return 0;  OP_SUB_F: return 1;  OP_MUL_F: return 3;
      OP_ADD_S: return 4;  OP_SUB_S: return 5;  OP_MUL_S: return 6;
      OP_DIV_F: return 7;  OP_DIV_S: return 8;
      default:  return 2;  // logic unit
    endcase
  endfunction

  function automatic bit is_slow(opcode_e op);
    return op inside {OP_ADD_S, OP_SUB_S, OP_MUL_S, OP_DIV_S};
  endfunction

  // function class 0 add, 1 sub, 2 mul, 3 div, -1 other
  function automatic int fclass(opcode_e op);
    case (op)
      OP_ADD_F, OP_ADD_S: return 0;
      OP_SUB_F, OP_SUB_S: return 1;
      OP_MUL_F, OP_MUL_S: return 2;
      OP_DIV_F, OP_DIV_S: return 3;
      default: return -1;
    endcase
  endfunction

  function automatic logic [31:0] ref_exec(opcode_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_MOV: return a;
      OP_ADD_F, OP_ADD_S: return a + b;
      OP_SUB_F, OP_SUB_S: return a - b;
      OP_MUL_F, OP_MUL_S: return 32'(a * b);
      OP_DIV_F, OP_DIV_S: return (b == 0) ? 32'hFFFF_FFFF : a / b;
      default: return 32'h0;
    endcase
  endfunction

  // ---------------- issue-timing model ----------------
  // Issue cycle of every instruction, relative to the first.
  function automatic void model_issue(input prog_t p, output int t [$]);
    int reg_ready [NREG];
    int unit_free [9];
    int last;
    foreach (reg_ready[r]) reg_ready[r] = 0;
    foreach (unit_free[u]) unit_free[u] = 0;
    t.delete();
    last = -1;
    foreach (p[k]) begin
      int ti;
      ti = last + 1;
      if (p[k].op != OP_NOP) begin
        ti = (reg_ready[p[k].rs1] > ti) ? reg_ready[p[k].rs1] : ti;
        ti = (reg_ready[p[k].rs2] > ti) ? reg_ready[p[k].rs2] : ti;
        ti = (reg_ready[p[k].rd]  > ti) ? reg_ready[p[k].rd]  : ti;
        ti = (unit_free[unit_of(p[k].op)] > ti) ? unit_free[unit_of(p[k].op)] : ti;
        reg_ready[p[k].rd] = ti + DLY[group_of(p[k].op)] + 2;
        unit_free[unit_of(p[k].op)] = ti + DLY[group_of(p[k].op)];
      end
      t.push_back(ti);
      last = ti;
    end
  endfunction

  function automatic int model_last(prog_t p);
    int t [$];
    model_issue(p, t);
    return (t.size() == 0) ? 0 : t[t.size() - 1];
  endfunction

  // ---------------- scheduler model ----------------
  // Two instructions depend on each other when one writes a register the
  // other reads or writes (reading the same register is no dependence).
  function automatic bit shares_reg(ins_t a, ins_t b);
    return a.rd == b.rd || a.rd == b.rs1 || a.rd == b.rs2 || b.rd == a.rs1 || b.rd == a.rs2;
  endfunction

  function automatic bit reads_earlier(prog_t p, int k);
    for (int i = 0; i < k; i++)
      if (p[i].rd == p[k].rs1 || p[i].rd == p[k].rs2 || p[i].rd == p[k].rd) return 1'b1;
    return 1'b0;
  endfunction

  function automatic opcode_e slow_of(opcode_e op);
    return (fclass(op) >= 0 && !is_slow(op)) ? opcode_e'(op + 1) : op;
  endfunction

  function automatic opcode_e fast_of(opcode_e op);
    return is_slow(op) ? opcode_e'(op - 1) : op;
  endfunction

  // Stall of x if appended to out: cycles lost before it issues.
  function automatic int stall_of(prog_t out, ins_t x);
    prog_t trial;
    trial = out;
    trial.push_back(x);
    return model_last(trial) - ((out.size() == 0) ? -1 : model_last(out)) - 1;
  endfunction

  // (iii) Append x; while it would stall, switch slow instructions to fast,
  // x itself first, then the placed ones latest first, keeping each switch
  // only if it shortens the stall and does not delay what is already placed.
  function automatic prog_t place(prog_t out, ins_t x);
    int gap;
    gap = stall_of(out, x);
    if (gap > 0 && is_slow(x.op)) begin
      ins_t xf;
      xf = x; xf.op = fast_of(x.op);
      if (stall_of(out, xf) < gap) begin x = xf; gap = stall_of(out, x); end
    end
    for (int i = out.size() - 1; i >= 0 && gap > 0; i--) begin
      if (is_slow(out[i].op)) begin
        prog_t alt;
        alt = out; alt[i].op = fast_of(alt[i].op);
        if (model_last(alt) <= model_last(out) && stall_of(alt, x) < gap) begin
          out = alt; gap = stall_of(out, x);
        end
      end
    end
    out.push_back(x);
    return out;
  endfunction

  function automatic prog_t schedule(prog_t src);
    prog_t out, keep_order;
    bit    indep [$];
    bit    used  [$];
    keep_order = src;
    foreach (keep_order[k]) keep_order[k].op = slow_of(keep_order[k].op);
    foreach (src[k]) begin
      bit ind;
      ind = 1'b1;
      foreach (src[j]) if (j != k && shares_reg(src[k], src[j])) ind = 1'b0;
      indep.push_back(ind);
      used.push_back(1'b0);
      src[k].op = slow_of(src[k].op);
    end
    foreach (src[k]) begin
      if (used[k]) continue;
      // (ii) pull independent instructions forward while a dependent one
      // would stall
      if (!indep[k] && reads_earlier(src, k)) begin
        while (stall_of(out, src[k]) > 0) begin
          int nxt;
          nxt = -1;
          for (int j = k + 1; j < src.size(); j++) if (indep[j] && !used[j]) begin nxt = j; break; end
          if (nxt < 0) break;
          out = place(out, src[nxt]);
          used[nxt] = 1'b1;
        end
      end
      out = place(out, src[k]);
      used[k] = 1'b1;
    end
    // keep the reordering only if it is no slower than the given order
    out = no_stall(out);
    keep_order = no_stall(keep_order);
    return (model_last(out) <= model_last(keep_order)) ? out : keep_order;
  endfunction

  // Final guarantee: no instruction may issue later than it would with every
  // unit fast in the same order. While one does, switch a slow instruction
  // before it to fast (one whose switch makes it earlier, else the latest).
  function automatic prog_t no_stall(prog_t p);
    forever begin
      prog_t pf;
      int    ts [$], tf [$];
      int    bad, pick;
      pf = p;
      foreach (pf[k]) pf[k].op = fast_of(pf[k].op);
      model_issue(p, ts);
      model_issue(pf, tf);
      bad = -1;
      foreach (ts[k]) if (ts[k] > tf[k]) begin bad = k; break; end
      if (bad < 0) return p;
      pick = -1;
      for (int i = bad; i >= 0 && pick < 0; i--) begin
        if (is_slow(p[i].op)) begin
          prog_t alt;
          int    ta [$];
          alt = p; alt[i].op = fast_of(alt[i].op);
          model_issue(alt, ta);
          if (ta[bad] < ts[bad]) pick = i;
        end
      end
      for (int i = bad; i >= 0 && pick < 0; i--) if (is_slow(p[i].op)) pick = i;
      if (pick < 0) return p;   // cannot happen: all fast equals tf
      p[pick].op = fast_of(p[pick].op);
    end
  endfunction

  // ---------------- running code on the RTL ----------------
  int issue_cycles [$];
  always @(negedge clk) if (rst_n && issued != '0) issue_cycles.push_back(cyc);

  task automatic run(input prog_t prog, input logic [31:0] init [NREG], output logic [31:0] res [NREG]);
    int i;
    rst_n = 1'b0; instr_valid = 1'b0; instr = '0; dc_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < int'(NREG); r++) begin
      dc_we = 1'b1; dc_waddr = reg_idx_t'(r); dc_wdata = init[r];
      @(negedge clk);
    end
    dc_we = 1'b0;
    issue_cycles.delete();
    i = 0;
    while (i < prog.size()) begin
      instr_valid = 1'b1;
      instr = encode(prog[i].op, reg_idx_t'(prog[i].rd), reg_idx_t'(prog[i].rs1), reg_idx_t'(prog[i].rs2));
      @(posedge clk);
      if (instr_ready) i++;
      @(negedge clk);
    end
    instr_valid = 1'b0;
    while (!(instr_ready && idle && issued == '0 && !retired_nop)) @(negedge clk);
    for (int r = 0; r < int'(NREG); r++) begin
      dc_raddr = reg_idx_t'(r); #1;
      res[r] = dc_rdata;
    end
  endtask

  task automatic check_timing(string what, prog_t p);
    int t [$];
    model_issue(p, t);
    checks++;
    if (issue_cycles.size() != p.size()) begin
      failures++; $display("%s: %0d issues seen, %0d expected", what, issue_cycles.size(), p.size());
    end else begin
      foreach (t[k]) if (issue_cycles[k] - issue_cycles[0] != t[k]) begin
        failures++; $display("%s: instruction %0d issued at +%0d, model +%0d", what, k,
                             issue_cycles[k] - issue_cycles[0], t[k]);
        break;
      end
    end
  endtask

  // ---------------- segment generator ----------------
  // Dependent work uses r1..r12; independent filler writes r16..r31 once each
  // and reads only r13..r15, which nothing writes.
  function automatic prog_t gen_segment(int len);
    prog_t p;
    int    fill_rd;
    fill_rd = 16;
    for (int k = 0; k < len; k++) begin
      int sel;
      sel = $urandom_range(99);
      if (sel < 35 && fill_rd < 32) begin
        opcode_e fop;
        case ($urandom_range(5))
          0: fop = OP_ADD_F; 1: fop = OP_SUB_F; 2: fop = OP_XOR; 3: fop = OP_AND;
          4: fop = OP_OR; default: fop = OP_MOV;
        endcase
        p.push_back('{fop, fill_rd++, 13 + $urandom_range(2), 13 + $urandom_range(2)});
      end else begin
        opcode_e dop;
        case ($urandom_range(19))
          0, 1, 2, 3, 4, 5, 6:  dop = OP_ADD_F;
          7, 8, 9, 10, 11:      dop = OP_SUB_F;
          12, 13:               dop = OP_MUL_F;
          14:                   dop = OP_DIV_F;
          default:              dop = (sel[0]) ? OP_XOR : OP_MOV;
        endcase
        p.push_back('{dop, 1 + $urandom_range(11), 1 + $urandom_range(11), 1 + $urandom_range(11)});
      end
    end
    return p;
  endfunction

  localparam real EF [4] = '{56.0, 57.0, 703.0, 1218.0};
  localparam real ES [4] = '{23.0, 24.0, 394.0, 1049.0};

  initial begin
    int n_tot [4] = '{0, 0, 0, 0};
    int n_slow [4] = '{0, 0, 0, 0};
    int n_reordered = 0;
    string fname [4] = '{"addition", "subtraction", "multiplication", "division"};
    for (int s = 0; s < 40; s++) begin
      prog_t orig, sched;
      logic [31:0] init [NREG], res [NREG], exp_regs [NREG];
      orig = gen_segment(16 + $urandom_range(24));
      sched = schedule(orig);
      for (int r = 0; r < int'(NREG); r++) init[r] = ($urandom_range(3) == 0) ? 32'($urandom_range(7)) : $urandom;
      exp_regs = init;
      foreach (orig[k]) exp_regs[orig[k].rd] = ref_exec(orig[k].op, exp_regs[orig[k].rs1], exp_regs[orig[k].rs2]);
      // original order, all fast
      run(orig, init, res);
      check_timing("original", orig);
      begin
        int base_last;
        base_last = issue_cycles[issue_cycles.size() - 1] - issue_cycles[0];
        // scheduled code
        run(sched, init, res);
        check_timing("scheduled", sched);
        checks++;
        if (issue_cycles[issue_cycles.size() - 1] - issue_cycles[0] > base_last) begin
          failures++; $display("segment %0d: scheduled code issues later than the original", s);
        end
      end
      foreach (res[r]) begin
        checks++;
        if (res[r] !== exp_regs[r]) begin failures++; $display("segment %0d: r%0d = %h, expected %h", s, r, res[r], exp_regs[r]); end
      end
      foreach (sched[k]) if (fclass(sched[k].op) >= 0) begin
        n_tot[fclass(sched[k].op)]++;
        if (is_slow(sched[k].op)) n_slow[fclass(sched[k].op)]++;
      end
      foreach (orig[k]) if (orig[k].rd != sched[k].rd || orig[k].rs1 != sched[k].rs1 || orig[k].rs2 != sched[k].rs2) begin
        n_reordered++; break;
      end
    end
    for (int f = 0; f < 4; f++) begin
      real share;
      share = (n_tot[f] == 0) ? 0.0 : real'(n_slow[f]) / real'(n_tot[f]);
      $display("%-15s %4d of %4d on slow units (%5.1f%%), relative energy saving %5.1f%%",
               fname[f], n_slow[f], n_tot[f], 100.0 * share, 100.0 * share * (EF[f] - ES[f]) / EF[f]);
    end
    $display("segments reordered by the scheduler: %0d of 40", n_reordered);
    checks += 2;
    if (n_slow[0] + n_slow[1] == 0) begin failures++; $display("no add/sub went to a slow unit"); end
    if (n_reordered == 0) begin failures++; $display("the scheduler never reordered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
