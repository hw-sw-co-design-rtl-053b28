// decoder: splits an instruction word into opcode and operand fields and
// maps the opcode to the FU that executes it.
//
// Every FU has a machine code of its own (the fast and the slow adder have
// different opcodes), so the opcode alone selects the FU group, the FU inside
// the group and, for the logic unit, the sub-function. NOP and unknown
// opcodes come out as nop (unknown ones also set illegal); they are retired
// without occupying an FU. Purely combinational.
// One code per FU follows the source design; the field layout and the code
// values (lpalu_pkg::opcode_e) are this design's own.
module decoder
  import lpalu_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  output dec_t        dec
);
  opcode_e op;

  always_comb begin
    op          = opcode_e'(instr[31:26]);
    dec         = '0;
    dec.valid   = valid;
    dec.op      = op;
    dec.rd      = instr[25:21];
    dec.rs1     = instr[20:16];
    dec.rs2     = instr[15:11];
    unique case (op)
      OP_ADD_F: begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd0; end
      OP_SUB_F: begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd1; end
      OP_AND:   begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd2; dec.func = LF_AND; end
      OP_OR:    begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd2; dec.func = LF_OR;  end
      OP_XOR:   begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd2; dec.func = LF_XOR; end
      OP_MOV:   begin dec.group = G_FAST_ADDSUB; dec.fu = 2'd2; dec.func = LF_MOV; end
      OP_MUL_F: begin dec.group = G_FAST_MUL;    dec.fu = 2'd0; end
      OP_ADD_S: begin dec.group = G_SLOW_ADDSUB; dec.fu = 2'd0; end
      OP_SUB_S: begin dec.group = G_SLOW_ADDSUB; dec.fu = 2'd1; end
      OP_MUL_S: begin dec.group = G_SLOW_MUL;    dec.fu = 2'd0; end
      OP_DIV_F: begin dec.group = G_FAST_DIV;    dec.fu = 2'd0; end
      OP_DIV_S: begin dec.group = G_SLOW_DIV;    dec.fu = 2'd0; end
      OP_NOP:   dec.nop = 1'b1;
      default: begin
        dec.nop     = 1'b1;
        dec.illegal = 1'b1;
      end
    endcase
  end
endmodule
