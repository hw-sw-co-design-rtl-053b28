// logic_unit: the functional unit for instructions that have a single
// implementation (AND, OR, XOR, MOV).
//
// The source design sets apart instructions that do not use the duplicated
// fast/slow units; this unit executes them. func selects the operation
// (lpalu_pkg::logic_func_e): AND, OR, XOR of a and b, or MOV, which copies a.
// The operation set is this design's choice. Purely combinational; it sits
// in the 1-cycle group next to the fast adder and subtractor.
module logic_unit
  import lpalu_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [1:0]   func,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (logic_func_e'(func))
      LF_AND:  y = a & b;
      LF_OR:   y = a | b;
      LF_XOR:  y = a ^ b;
      default: y = a;   // LF_MOV
    endcase
  end
endmodule
