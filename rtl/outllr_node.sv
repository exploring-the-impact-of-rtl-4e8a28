// outllr_node: a-posteriori LLR of one code bit after the last iteration.
//
// Adds all DEG incoming check-to-variable messages with a plain adder tree, clips that sum
// exactly as the variable node does, clip(r,t) = max(min(r, QMAX-t), -QMAX-t) with t the
// channel LLR, and adds t. The result lies in [-QMAX, QMAX] with QMAX = 2^(DW-1)-1.
// Two's complement throughout. Purely combinational.
module outllr_node #(
  parameter int unsigned DEG = 4,
  parameter int unsigned DW  = 7
) (
  input  logic signed [DEG-1:0][DW-1:0] din,
  input  logic signed [DW-1:0]          llr,
  output logic signed [DW-1:0]          dout
);
  localparam int unsigned WC   = DW + $clog2(DEG + 1) + 2;
  localparam int          QMAX = (1 << (DW-1)) - 1;

  logic signed [WC-1:0] sum, t, hi, lo, rc;
  always_comb begin
    sum = '0;
    for (int i = 0; i < DEG; i++) sum = sum + WC'($signed(din[i]));
    t  = WC'(llr);
    hi = WC'(QMAX) - t;
    lo = -WC'(QMAX) - t;
    rc = (sum > hi) ? hi : ((sum < lo) ? lo : sum);
    dout = DW'(rc + t);
  end
endmodule
