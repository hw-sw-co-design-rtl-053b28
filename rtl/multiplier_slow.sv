// multiplier_slow: slow, low-power multiplier functional unit.
//
// y = (a * b) mod 2**W, the low word of the product. A linear array of W
// rows: row i adds a << i to the running sum when b[i] is set, with a
// ripple-carry adder in every row. The critical path runs through all rows
// and their carry chains, so it is much slower than multiplier_fast but uses
// fewer and simpler cells.
//
// Purely combinational; the pipeline samples its result after the slow
// multiplier group's cycle time. The shift-and-add array is this design's
// choice; the source design only states that a fast and a slow multiplier
// exist.
module multiplier_slow #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W-1:0] row [W+1];     // running sum after each row

  always_comb begin
    row[0] = '0;
    for (int unsigned i = 0; i < W; i++) begin
      logic [W-1:0] addend;
      logic         c;
      addend = b[i] ? (a << i) : '0;
      c = 1'b0;
      for (int unsigned k = 0; k < W; k++) begin
        row[i+1][k] = row[i][k] ^ addend[k] ^ c;
        c = (row[i][k] & addend[k]) | (c & (row[i][k] ^ addend[k]));
      end
    end
    y = row[W];
  end
endmodule
