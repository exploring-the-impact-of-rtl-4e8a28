// xor_unit: basic cell of the XOR (sign) network, built from three XOR blocks.
//
// In the forward direction it combines the two partial results a and b coming from the
// level below into up = a xor b. In the backward direction it receives from the level above
// the result p over every input outside this cell's subtree, and hands each child the
// result over everything except that child's own subtree: down_a = p xor b and
// down_b = p xor a. Purely combinational.
module xor_unit #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] p,
  output logic [W-1:0] up,
  output logic [W-1:0] down_a,
  output logic [W-1:0] down_b
);
  always_comb begin
    up     = a ^ b;
    down_a = p ^ b;
    down_b = p ^ a;
  end
endmodule
