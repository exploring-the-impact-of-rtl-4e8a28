// conversion_layer: hard decision on the information part of the codeword.
//
// The first K_INFO = (NB-MB)*Z a-posteriori LLRs belong to the systematic (information)
// columns of the code; bit i is the sign bit of LLR i, so a negative LLR decodes to 1 and a
// zero or positive LLR to 0. The parity columns are not converted. Pure wiring.
module conversion_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned DW = DWIDTH
) (
  input  logic [DW-1:0]     llr [N_VN],
  output logic [K_INFO-1:0]       bits
);
  for (genvar i = 0; i < K_INFO; i++) begin : g_bit
    assign bits[i] = llr[i][DW-1];
  end
endmodule
