// tb_multiplier_slow: self-checking test of the slow (shift-and-add array)
// multiplier. The low word of the product is checked against the simulator's
// own * at W = 32 on corner values and random operands, and at W = 6
// exhaustively.
module tb_multiplier_slow;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  logic [5:0]  a6, b6, y6;

  multiplier_slow #(.W(32)) u_m32 (.a(a),  .b(b),  .y(y));
  multiplier_slow #(.W(6))  u_m6  (.a(a6), .b(b6), .y(y6));

  task automatic check32(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks++;
    if (y !== 32'(x * z)) begin failures++; $display("MUL %h*%h=%h", x, z, y); end
  endtask

  initial begin
    logic [31:0] corner [7] = '{32'h0, 32'h1, 32'h2, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'hAAAA_5555};
    foreach (corner[i]) foreach (corner[j]) check32(corner[i], corner[j]);
    repeat (3000) check32($urandom, $urandom);
    repeat (500)  check32($urandom & 32'hFFFF, $urandom & 32'hFFFF);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j); #1;
        checks++;
        if (y6 !== 6'(i * j)) failures++;
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
