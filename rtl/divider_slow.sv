// divider_slow: slow, low-power divider functional unit.
//
// Unsigned division q = a / b. A combinational radix-2 restoring array: W
// rows, each shifts the next dividend bit into the partial remainder, tries
// one subtraction of b and keeps the difference when it does not borrow, which
// gives one quotient bit per row. Division by zero gives an all-ones quotient
// (every trial subtraction succeeds), the natural result of the array.
//
// Purely combinational; the pipeline samples its result after the slow
// divider group's cycle time. The restoring array, unsigned operands, the
// quotient as the only result and the divide-by-zero value are this design's
// choices.
module divider_slow #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  always_comb begin
    logic [W-1:0] rem;
    logic [W:0]   trial;
    logic [W:0]   diff;
    rem = '0;
    for (int i = W - 1; i >= 0; i--) begin
      trial = {rem, a[i]};
      diff  = trial - {1'b0, b};
      q[i]  = ~diff[W];
      rem   = diff[W] ? trial[W-1:0] : diff[W-1:0];
    end
  end
endmodule
