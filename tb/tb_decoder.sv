// tb_decoder: self-checking test of the instruction decoder. For every one
// of the 64 opcode values, with random register fields, it compares the
// decoded group, FU, sub-function, NOP and illegal flags and register fields
// with a table written out in the testbench.
module tb_decoder;
  import lpalu_pkg::*;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        valid;
  logic [31:0] instr;
  dec_t        dec;

  decoder dut (.valid, .instr, .dec);

  // expected {known, nop, group, fu, func} per opcode
  task automatic expect_of(input logic [5:0] op, output logic known, output logic nop,
                           output logic [2:0] grp, output logic [1:0] fu, output logic [1:0] func);
    known = 1'b1; nop = 1'b0; grp = 0; fu = 0; func = 0;
    case (op)
      6'h00: nop = 1'b1;
      6'h01: begin grp = 0; fu = 2; func = 0; end
      6'h02: begin grp = 0; fu = 2; func = 1; end
      6'h03: begin grp = 0; fu = 2; func = 2; end
      6'h04: begin grp = 0; fu = 2; func = 3; end
      6'h08: begin grp = 0; fu = 0; end
      6'h09: begin grp = 2; fu = 0; end
      6'h0A: begin grp = 0; fu = 1; end
      6'h0B: begin grp = 2; fu = 1; end
      6'h0C: begin grp = 1; fu = 0; end
      6'h0D: begin grp = 3; fu = 0; end
      6'h0E: begin grp = 4; fu = 0; end
      6'h0F: begin grp = 5; fu = 0; end
      default: begin known = 1'b0; nop = 1'b1; end
    endcase
  endtask

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int op = 0; op < 64; op++) begin
        logic k, n; logic [2:0] g; logic [1:0] f, fn;
        logic [4:0] rd, r1, r2;
        rd = 5'($urandom); r1 = 5'($urandom); r2 = 5'($urandom);
        valid = rep[0];
        instr = {6'(op), rd, r1, r2, 11'($urandom)};
        #1;
        expect_of(6'(op), k, n, g, f, fn);
        checks++;
        if (dec.valid !== valid || dec.nop !== n || dec.illegal !== !k ||
            dec.rd !== rd || dec.rs1 !== r1 || dec.rs2 !== r2 ||
            (!n && (dec.group !== g || dec.fu !== f || dec.func !== fn))) begin
          failures++;
          $display("op %h: got grp %0d fu %0d func %0d nop %b ill %b", op, dec.group, dec.fu, dec.func, dec.nop, dec.illegal);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
