// divider_fast: fast divider functional unit.
//
// Unsigned division q = a / b. A combinational radix-4 restoring array: W/2
// rows, each shifts two dividend bits into the partial remainder and tries
// the three subtractions of b, 2b and 3b in parallel, keeping the largest
// that does not borrow; that gives two quotient bits per row. Half the rows
// of divider_slow and three subtractors per row: faster, more logic, more
// energy. Division by zero gives an all-ones quotient, as in divider_slow.
//
// Purely combinational; the pipeline samples its result after the fast
// divider group's cycle time. The radix-4 array is this design's choice; the
// source design only states that a fast and a slow divider exist. W must be
// even.
module divider_fast #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  logic [W+1:0] b1, b2, b3;

  assign b1 = {2'b00, b};
  assign b2 = {1'b0, b, 1'b0};
  assign b3 = b1 + b2;

  always_comb begin
    logic [W-1:0] rem;
    logic [W+1:0] trial;
    logic [W+2:0] d1, d2, d3;
    rem = '0;
    for (int j = W / 2 - 1; j >= 0; j--) begin
      trial = {rem, a[2*j +: 2]};
      d1 = {1'b0, trial} - {1'b0, b1};
      d2 = {1'b0, trial} - {1'b0, b2};
      d3 = {1'b0, trial} - {1'b0, b3};
      if (!d3[W+2]) begin
        q[2*j +: 2] = 2'd3; rem = d3[W-1:0];
      end else if (!d2[W+2]) begin
        q[2*j +: 2] = 2'd2; rem = d2[W-1:0];
      end else if (!d1[W+2]) begin
        q[2*j +: 2] = 2'd1; rem = d1[W-1:0];
      end else begin
        q[2*j +: 2] = 2'd0; rem = trial[W-1:0];
      end
    end
  end

  initial begin
    assert (W % 2 == 0 && W >= 2) else $error("divider_fast: W must be even");
  end
endmodule
