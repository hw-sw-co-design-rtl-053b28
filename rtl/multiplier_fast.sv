// multiplier_fast: fast multiplier functional unit.
//
// y = (a * b) mod 2**W, the low word of the product (the same for signed and
// unsigned operands). Radix-4 Booth recoding of b gives W/2 partial products,
// each 0, +-a or +-2a shifted by two bits per digit, and a balanced binary
// tree of adders sums them in log2(W/2) levels. Fewer, wider levels make it
// faster and hungrier than multiplier_slow, the low-power counterpart.
//
// Purely combinational; the pipeline samples its result after the fast
// multiplier group's cycle time. Booth recoding and the adder tree are this
// design's choices; the source design only states that a fast and a slow
// multiplier exist. W must be even.
module multiplier_fast #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int unsigned NPP = W / 2;

  logic [W-1:0] node [2*NPP];   // heap-ordered tree: leaves NPP..2*NPP-1, root 1
  logic [W:0]   bx;             // b with the implicit b[-1] = 0 below bit 0

  assign bx = {b, 1'b0};

  always_comb begin
    node[0] = '0;
    for (int unsigned j = 0; j < NPP; j++) begin
      logic [2:0]   dig;
      logic [W-1:0] mag;
      dig = bx[2*j +: 3];        // b[2j+1], b[2j], b[2j-1]
      unique case (dig)
        3'b001, 3'b010, 3'b101, 3'b110: mag = a;
        3'b011, 3'b100:                 mag = a << 1;
        default:                        mag = '0;
      endcase
      if (dig[2] && dig != 3'b111) mag = ~mag + 1'b1;  // negative digit
      node[NPP + j] = mag << (2 * j);
    end
    for (int unsigned i = NPP - 1; i >= 1; i--)
      node[i] = node[2*i] + node[2*i + 1];
    y = node[1];
  end

  initial begin
    assert (W % 2 == 0 && W >= 4) else $error("multiplier_fast: W must be even and at least 4");
  end
endmodule
