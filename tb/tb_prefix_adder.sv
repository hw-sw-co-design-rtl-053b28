// tb_prefix_adder: self-checking test of the fast (parallel-prefix) adder and
// subtractor. Both variants are checked at W = 32 against the simulator's own
// + and - on corner values and random operands, and at W = 8 exhaustively.
module tb_prefix_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, ys, yd;
  logic [7:0]  a8, b8, ys8, yd8;

  prefix_adder #(.W(32), .SUBTRACT(1'b0)) u_add   (.a(a),  .b(b),  .y(ys));
  prefix_adder #(.W(32), .SUBTRACT(1'b1)) u_sub   (.a(a),  .b(b),  .y(yd));
  prefix_adder #(.W(8),  .SUBTRACT(1'b0)) u_add8  (.a(a8), .b(b8), .y(ys8));
  prefix_adder #(.W(8),  .SUBTRACT(1'b1)) u_sub8  (.a(a8), .b(b8), .y(yd8));

  task automatic check32(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks += 2;
    if (ys !== x + z) begin failures++; $display("ADD %h+%h=%h", x, z, ys); end
    if (yd !== x - z) begin failures++; $display("SUB %h-%h=%h", x, z, yd); end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5555_AAAA};
    foreach (corner[i]) foreach (corner[j]) check32(corner[i], corner[j]);
    repeat (3000) check32($urandom, $urandom);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks += 2;
        if (ys8 !== 8'(i + j)) failures++;
        if (yd8 !== 8'(i - j)) failures++;
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
