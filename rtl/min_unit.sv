// min_unit: basic cell of the minimum network, built from three two-input minimum blocks.
//
// In the forward direction it combines the two partial results a and b coming from the
// level below into up = a min b. In the backward direction it receives from the level above
// the result p over every input outside this cell's subtree, and hands each child the
// result over everything except that child's own subtree: down_a = p min b and
// down_b = p min a. Purely combinational.
module min_unit #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] p,
  output logic [W-1:0] up,
  output logic [W-1:0] down_a,
  output logic [W-1:0] down_b
);
  function automatic logic [W-1:0] min2(logic [W-1:0] x, logic [W-1:0] y);
    return (x < y) ? x : y;
  endfunction

  always_comb begin
    up     = min2(a, b);
    down_a = min2(p, b);
    down_b = min2(p, a);
  end
endmodule
