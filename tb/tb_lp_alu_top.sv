// tb_lp_alu_top: end-to-end test of the low-power ALU pipeline at its default
// parameters (32-bit data, cycle times 1/2/3/6/7/11).
//
// The testbench loads registers through the data-cache In/Out port, streams a
// program through the instruction fetch port, waits until the pipeline has
// drained and reads every register back through the In/Out port. The result
// is compared with an in-order reference model of the instruction set written
// in the testbench. Parts:
//   1. latency: for every opcode, a dependent instruction must issue exactly
//      D+2 cycles after the producer (D = its group's cycle time);
//      independent instructions issue one per cycle; two slow adds in a row
//      wait for the busy slow adder.
//   2. random programs over a few registers, so that read-after-write and
//      write-after-write stalls, busy FUs, out-of-order completion and several
//      write-backs in one cycle all occur; each is counted and must be seen.
//   3. slow-unit assignment: for programs with independent work between
//      producers and consumers, each add/sub/mul/div is switched to its slow
//      machine code in turn and kept there only if the program's cycle count
//      does not grow (the no-extra-stall rule of the offline scheduler). The
//      number of slow assignments and the energy saved by them (per-operation
//      energies of the fast and slow units: add 56/23 pJ, sub 57/24 pJ,
//      mul 703/394 pJ, div 1218/1049 pJ) are printed; at least one slow
//      assignment must be found and no cycle count may grow.
module tb_lp_alu_top;
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

  // ------------------------------------------------------------------
  // reference model
  // ------------------------------------------------------------------
  logic [31:0] ref_regs [NREG];

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

  // ------------------------------------------------------------------
  // mechanism counters (monitor)
  // ------------------------------------------------------------------
  int n_raw = 0, n_waw = 0, n_busy = 0, n_multi_wb = 0, n_ooo = 0, n_nop = 0, n_bubble = 0;
  int n_issue_grp [NGROUP];
  int n_wb_grp    [NGROUP];
  int issue_cycle [$];          // cycle of every issue in the current run
  int seq = 0;
  int inflight [NGROUP][$];     // sequence numbers in flight per group

  initial foreach (n_issue_grp[g]) begin n_issue_grp[g] = 0; n_wb_grp[g] = 0; end

  always @(negedge clk) if (rst_n) begin
    n_raw  += int'(stall_raw);
    n_waw  += int'(stall_waw);
    n_busy += int'(stall_busy);
    n_nop  += int'(retired_nop);
    if ($countones(wrote_back) > 1) n_multi_wb++;
    if (instr_ready && !instr_valid) n_bubble++;
    for (int g = 0; g < int'(NGROUP); g++) begin
      if (wrote_back[g]) begin
        int s;
        n_wb_grp[g]++;
        s = inflight[g].pop_front();
        for (int h = 0; h < int'(NGROUP); h++)
          if (h != g && inflight[h].size() > 0 && inflight[h][0] < s) begin n_ooo++; break; end
      end
    end
    for (int g = 0; g < int'(NGROUP); g++) begin
      if (issued[g]) begin
        n_issue_grp[g]++;
        inflight[g].push_back(seq++);
        issue_cycle.push_back(cyc);
      end
    end
  end

  // ------------------------------------------------------------------
  // run one program: load registers, stream instructions, drain, compare
  // ------------------------------------------------------------------
  typedef struct { opcode_e op; int rd, rs1, rs2; } ins_t;

  task automatic reset_dut();
    rst_n = 1'b0; instr_valid = 1'b0; instr = '0; dc_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic run(input ins_t prog [$], input logic [31:0] init [NREG], input int gap_pct,
                     output int cycles);
    int start, i;
    reset_dut();
    issue_cycle.delete();
    // load the register file through the In/Out port
    for (int r = 0; r < int'(NREG); r++) begin
      dc_we = 1'b1; dc_waddr = reg_idx_t'(r); dc_wdata = init[r];
      @(negedge clk);
    end
    dc_we = 1'b0;
    foreach (init[r]) ref_regs[r] = init[r];
    foreach (prog[k]) ref_regs[prog[k].rd] = (prog[k].op == OP_NOP) ? ref_regs[prog[k].rd]
                                           : ref_exec(prog[k].op, ref_regs[prog[k].rs1], ref_regs[prog[k].rs2]);
    // stream the program (instr is presented until taken)
    start = cyc;
    i = 0;
    while (i < prog.size()) begin
      instr_valid = ($urandom_range(99) >= gap_pct);
      instr = encode(prog[i].op, reg_idx_t'(prog[i].rd), reg_idx_t'(prog[i].rs1), reg_idx_t'(prog[i].rs2));
      @(posedge clk);
      if (instr_valid && instr_ready) i++;
      @(negedge clk);
    end
    instr_valid = 1'b0;
    while (!(instr_ready && idle && issued == '0 && !retired_nop)) @(negedge clk);
    cycles = cyc - start;
    // read back and compare
    for (int r = 0; r < int'(NREG); r++) begin
      dc_raddr = reg_idx_t'(r); #1;
      checks++;
      if (dc_rdata !== ref_regs[r]) begin
        failures++; $display("r%0d = %h, expected %h", r, dc_rdata, ref_regs[r]);
      end
    end
  endtask

  function automatic void rand_init(output logic [31:0] init [NREG]);
    for (int r = 0; r < int'(NREG); r++) init[r] = ($urandom_range(3) == 0) ? 32'($urandom_range(9)) : $urandom;
  endfunction

  localparam opcode_e ALL_OPS [13] = '{OP_NOP, OP_AND, OP_OR, OP_XOR, OP_MOV, OP_ADD_F, OP_ADD_S,
                                       OP_SUB_F, OP_SUB_S, OP_MUL_F, OP_MUL_S, OP_DIV_F, OP_DIV_S};

  function automatic bit slowable(opcode_e op);
    return op inside {OP_ADD_F, OP_SUB_F, OP_MUL_F, OP_DIV_F};
  endfunction

  function automatic real energy(opcode_e op);   // pJ per operation
    case (op)
      OP_ADD_F: return 56;  OP_ADD_S: return 23;
      OP_SUB_F: return 57;  OP_SUB_S: return 24;
      OP_MUL_F: return 703; OP_MUL_S: return 394;
      OP_DIV_F: return 1218; OP_DIV_S: return 1049;
      default:  return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] init [NREG];
    ins_t prog [$];
    int   cycles;

    // ---------------- 1. latency and throughput ----------------
    foreach (ALL_OPS[k]) begin
      opcode_e op;
      op = ALL_OPS[k];
      if (op == OP_NOP) continue;
      rand_init(init);
      prog = '{'{op, 10, 1, 2}, '{OP_ADD_F, 11, 10, 10}};
      run(prog, init, 0, cycles);
      checks++;
      if (issue_cycle.size() != 2 || issue_cycle[1] - issue_cycle[0] != DLY[group_of(op)] + 2) begin
        failures++;
        $display("latency %s: issues %p, expected distance %0d", op.name(), issue_cycle, DLY[group_of(op)] + 2);
      end
    end
    rand_init(init);
    prog = '{'{OP_ADD_F, 10, 1, 2}, '{OP_SUB_F, 11, 3, 4}, '{OP_MUL_F, 12, 5, 6}, '{OP_XOR, 13, 7, 8},
             '{OP_ADD_S, 14, 1, 2}, '{OP_SUB_S, 15, 3, 4}};
    run(prog, init, 0, cycles);
    checks++;
    if (issue_cycle.size() != 6 || issue_cycle[5] - issue_cycle[0] != 5) begin
      failures++; $display("throughput: issues %p", issue_cycle);
    end
    prog = '{'{OP_ADD_S, 10, 1, 2}, '{OP_ADD_S, 11, 3, 4}};
    run(prog, init, 0, cycles);
    checks++;
    if (issue_cycle.size() != 2 || issue_cycle[1] - issue_cycle[0] != DLY[2]) begin
      failures++; $display("busy slow adder: issues %p", issue_cycle);
    end

    // ---------------- 2. random programs ----------------
    for (int p = 0; p < 40; p++) begin
      prog.delete();
      for (int k = 0; k < 60; k++)
        prog.push_back('{ALL_OPS[$urandom_range(12)], $urandom_range(7), $urandom_range(7), $urandom_range(7)});
      rand_init(init);
      run(prog, init, (p % 4) * 10, cycles);
    end

    // ---------------- 3. slow-unit assignment ----------------
    begin
      int n_arith = 0, n_slow = 0;
      real e_fast = 0, e_sched = 0;
      for (int p = 0; p < 12; p++) begin
        int base, c;
        prog.delete();
        // producer/consumer chains over r1..r6 with independent filler on r8..r15
        for (int k = 0; k < 24; k++) begin
          int kind;
          kind = $urandom_range(9);
          if (kind < 4)
            prog.push_back('{ALL_OPS[5 + 2 * $urandom_range(3)], 1 + $urandom_range(5), 1 + $urandom_range(5), 1 + $urandom_range(5)});
          else
            prog.push_back('{ALL_OPS[$urandom_range(1, 4)], 8 + $urandom_range(7), 8 + $urandom_range(7), 8 + $urandom_range(7)});
        end
        rand_init(init);
        run(prog, init, 0, base);
        foreach (prog[k]) begin
          if (slowable(prog[k].op)) begin
            n_arith++;
            e_fast += energy(prog[k].op);
          end
        end
        foreach (prog[k]) begin
          if (slowable(prog[k].op)) begin
            opcode_e keep;
            keep = prog[k].op;
            prog[k].op = opcode_e'(keep + 1);       // the slow unit's code
            run(prog, init, 0, c);
            if (c > base) prog[k].op = keep;         // would stall: keep the fast unit
            else n_slow++;
          end
        end
        run(prog, init, 0, c);
        checks++;
        if (c > base) begin failures++; $display("program %0d: %0d cycles with slow units, %0d fast", p, c, base); end
        foreach (prog[k]) e_sched += energy(prog[k].op);
      end
      $display("slow-unit assignment: %0d of %0d arithmetic instructions, energy %0.0f pJ -> %0.0f pJ (%0.1f%% saved)",
               n_slow, n_arith, e_fast, e_sched, 100.0 * (e_fast - e_sched) / e_fast);
      checks++;
      if (n_slow == 0) begin failures++; $display("no slow unit could be used"); end
    end

    // ---------------- mechanisms seen ----------------
    $display("stalls raw %0d waw %0d busy %0d, multi write-back %0d, out-of-order %0d, nop %0d, fetch bubbles %0d",
             n_raw, n_waw, n_busy, n_multi_wb, n_ooo, n_nop, n_bubble);
    $display("issues per group %p, write-backs per group %p", n_issue_grp, n_wb_grp);
    checks += 7;
    if (n_raw == 0)      begin failures++; $display("no RAW stall"); end
    if (n_waw == 0)      begin failures++; $display("no WAW stall"); end
    if (n_busy == 0)     begin failures++; $display("no busy stall"); end
    if (n_multi_wb == 0) begin failures++; $display("no simultaneous write-backs"); end
    if (n_ooo == 0)      begin failures++; $display("no out-of-order completion"); end
    if (n_nop == 0)      begin failures++; $display("no NOP"); end
    if (n_bubble == 0)   begin failures++; $display("no fetch bubble"); end
    for (int g = 0; g < int'(NGROUP); g++) begin
      checks++;
      if (n_issue_grp[g] == 0 || n_issue_grp[g] != n_wb_grp[g]) begin
        failures++; $display("group %0d: %0d issued, %0d written back", g, n_issue_grp[g], n_wb_grp[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
