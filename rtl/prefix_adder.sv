// prefix_adder: fast adder or fast subtractor functional unit.
//
// Computes y = a + b (SUBTRACT = 0) or y = a - b (SUBTRACT = 1), modulo
// 2**W. It is the fast, high-energy counterpart of ripple_adder: the carries
// come from a Kogge-Stone parallel-prefix network of log2(W) levels, so the
// delay grows with log2(W) at the price of about W*log2(W) extra cells.
// Subtraction adds the inverted b with a carry-in of one.
//
// Purely combinational. In the pipeline its operands are held in the group's
// operand register and the result is sampled after the group's cycle time.
// That fast and slow add/subtract units exist is from the source design; the
// choice of a Kogge-Stone network is this design's own.
module prefix_adder #(
  parameter int unsigned W        = 32,
  parameter bit          SUBTRACT = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] bb;
  logic         cin;
  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W-1:0] c;

  assign bb  = SUBTRACT ? ~b : b;
  assign cin = SUBTRACT;

  always_comb begin
    g[0] = a & bb;
    p[0] = a ^ bb;
    for (int unsigned l = 0; l < LV; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    // g[LV][i] / p[LV][i]: generate / propagate of bits i..0
    c[0] = cin;
    for (int unsigned i = 1; i < W; i++)
      c[i] = g[LV][i-1] | (p[LV][i-1] & cin);
    y = p[0] ^ c;
  end
endmodule
