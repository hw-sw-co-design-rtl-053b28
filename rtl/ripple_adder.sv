// ripple_adder: slow, low-power adder or subtractor functional unit.
//
// Computes y = a + b (SUBTRACT = 0) or y = a - b (SUBTRACT = 1), modulo
// 2**W, with one full adder per bit and the carry rippling from bit 0 to bit
// W-1. It has the least logic of any adder and the longest carry path, which
// is what makes it the slow, low-energy unit of the pair (prefix_adder is the
// fast one). Subtraction adds the inverted b with a carry-in of one.
//
// Purely combinational; the pipeline samples its result after the slow
// group's cycle time. Using a ripple-carry chain for the slow unit is this
// design's choice.
module ripple_adder #(
  parameter int unsigned W        = 32,
  parameter bit          SUBTRACT = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W-1:0] bb;

  assign bb = SUBTRACT ? ~b : b;

  always_comb begin
    logic c;   // carry into the current bit
    c = SUBTRACT;
    for (int unsigned i = 0; i < W; i++) begin
      y[i] = a[i] ^ bb[i] ^ c;
      c    = (a[i] & bb[i]) | (c & (a[i] ^ bb[i]));
    end
  end
endmodule
