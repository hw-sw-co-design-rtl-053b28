// tb_divider_fast: self-checking test of the fast (radix-4) divider. The
// unsigned quotient is checked against the simulator's own / at W = 32 on
// corner values and random operands (small and large divisors), at W = 6
// exhaustively, and division by zero must give an all-ones quotient.
module tb_divider_fast;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, q;
  logic [5:0]  a6, b6, q6;

  divider_fast #(.W(32)) u_d32 (.a(a),  .b(b),  .q(q));
  divider_fast #(.W(6))  u_d6  (.a(a6), .b(b6), .q(q6));

  function automatic logic [31:0] ref_div(logic [31:0] x, logic [31:0] z);
    return (z == 0) ? 32'hFFFF_FFFF : x / z;
  endfunction

  task automatic check32(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks++;
    if (q !== ref_div(x, z)) begin failures++; $display("DIV %h/%h=%h", x, z, q); end
  endtask

  initial begin
    logic [31:0] corner [7] = '{32'h0, 32'h1, 32'h3, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0001_0000};
    foreach (corner[i]) foreach (corner[j]) check32(corner[i], corner[j]);
    repeat (2000) check32($urandom, $urandom);
    repeat (2000) check32($urandom, $urandom & 32'h0000_0FFF);
    repeat (500)  check32($urandom, $urandom & 32'h7);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j); #1;
        checks++;
        if (q6 !== ((j == 0) ? 6'h3F : 6'(i / j))) failures++;
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
