// variable_node: variable node of degree DEG on full-precision messages.
//
// Output i is the channel LLR plus the sum of all inputs except input i. The exclusive sums
// come from an adder_network of SIZE inputs (spare inputs tied to zero). Each partial sum r
// is then limited by message clipping, clip(r,t) = max(min(r, QMAX-t), -QMAX-t) with t the
// channel LLR and QMAX = 2^(DW-1)-1, before t is added, so every output lies in
// [-QMAX, QMAX] and fits DW bits. All values are two's complement. Purely combinational.
module variable_node #(
  parameter int unsigned DEG  = 4,
  parameter int unsigned SIZE = 4,
  parameter int unsigned DW   = 7
) (
  input  logic signed [DEG-1:0][DW-1:0] din,
  input  logic signed [DW-1:0]          llr,
  output logic signed [DEG-1:0][DW-1:0] dout
);
  localparam int unsigned K    = $clog2(SIZE);
  localparam int unsigned WS   = DW + K;        // partial-sum width
  localparam int unsigned WC   = WS + 2;        // width for the clipping arithmetic
  localparam int          QMAX = (1 << (DW-1)) - 1;

  logic [SIZE-1:0][DW-1:0] add_in;
  logic [SIZE-1:0][WS-1:0] add_out;

  always_comb begin
    for (int i = 0; i < SIZE; i++) add_in[i] = (i < DEG) ? din[i] : '0;
  end

  adder_network #(.SIZE(SIZE), .W(DW)) u_add (.din(add_in), .dout(add_out));

  logic signed [WC-1:0] t, hi, lo, r, rc;
  always_comb begin
    t  = WC'(llr);
    hi = WC'(QMAX) - t;
    lo = -WC'(QMAX) - t;
    for (int i = 0; i < DEG; i++) begin
      r  = WC'($signed(add_out[i]));
      rc = (r > hi) ? hi : ((r < lo) ? lo : r);
      dout[i] = DW'(rc + t);
    end
  end
endmodule
