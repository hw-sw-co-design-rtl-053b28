// tb_logic_unit: self-checking test of the logic unit: AND, OR, XOR and MOV
// on random and corner operands, compared with the simulator's operators.
module tb_logic_unit;
  import lpalu_pkg::*;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y, exp_y;
  logic [1:0]  func;

  logic_unit #(.W(32)) dut (.a, .b, .func, .y);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = (n < 4) ? 32'hFFFF_0000 : $urandom;
      b = (n < 4) ? 32'hFF00_FF00 : $urandom;
      func = 2'(n);
      #1;
      unique case (logic_func_e'(func))
        LF_AND:  exp_y = a & b;
        LF_OR:   exp_y = a | b;
        LF_XOR:  exp_y = a ^ b;
        default: exp_y = a;
      endcase
      checks++;
      if (y !== exp_y) begin failures++; $display("func %0d a=%h b=%h y=%h", func, a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
