// check_node: offset-min-sum check node of degree DEG working on quantized messages.
//
// Each message is a QW-bit sign-magnitude value (sign on top). For every output i the
// magnitude is the minimum of the other inputs' magnitudes, reduced by OFFSET and floored at
// zero (OFFSET = 0 gives plain min-sum), and the sign is the XOR of the other inputs' signs.
// Magnitudes go through a min_network and signs through an xor_network, both of SIZE inputs
// (the power of two at or above DEG); spare inputs carry the largest magnitude and a positive
// sign so that they never win a minimum or flip a sign. Because the RCQ reconstruction
// tables are monotonic, taking minima of magnitude indices equals taking them of the
// reconstructed values, so the node runs at the quantized width. Purely combinational.
module check_node #(
  parameter int unsigned DEG    = 22,
  parameter int unsigned SIZE   = 32,
  parameter int unsigned QW     = 3,
  parameter int unsigned OFFSET = 0
) (
  input  logic [DEG-1:0][QW-1:0] din,
  output logic [DEG-1:0][QW-1:0] dout
);
  localparam int unsigned MW = QW - 1;

  logic [SIZE-1:0][MW-1:0] mag_in,  mag_out;
  logic [SIZE-1:0]         sgn_in,  sgn_out;

  always_comb begin
    for (int i = 0; i < SIZE; i++) begin
      if (i < DEG) begin
        mag_in[i] = din[i][MW-1:0];
        sgn_in[i] = din[i][QW-1];
      end else begin
        mag_in[i] = '1;
        sgn_in[i] = 1'b0;
      end
    end
  end

  min_network #(.SIZE(SIZE), .W(MW)) u_min (.din(mag_in), .dout(mag_out));
  xor_network #(.SIZE(SIZE), .W(1))  u_xor (.din(sgn_in), .dout(sgn_out));

  // offset subtraction and max(.,0)
  always_comb begin
    for (int i = 0; i < DEG; i++) begin
      if (int'(mag_out[i]) > int'(OFFSET)) dout[i] = {sgn_out[i], MW'(int'(mag_out[i]) - int'(OFFSET))};
      else                                 dout[i] = {sgn_out[i], MW'(0)};
    end
  end
endmodule
