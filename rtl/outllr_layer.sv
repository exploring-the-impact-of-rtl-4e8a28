// outllr_layer: the N_VN a-posteriori LLR calculators that replace the variable node layer
// in the last iteration. Node n = y*Z+z adds its first VN_DEG[y] input slots to its channel
// LLR (with clipping) and gives one DW-bit LLR. Purely combinational.
module outllr_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned DW = DWIDTH
) (
  input  logic [DW-1:0] din  [N_VN][VDEG_MAX],
  input  logic [DW-1:0] llr  [N_VN],
  output logic [DW-1:0] dout [N_VN]
);
  for (genvar y = 0; y < NB; y++) begin : g_col
    localparam int unsigned DEG = VN_DEG[y];
    for (genvar z = 0; z < Z; z++) begin : g_out
      logic [DEG-1:0][DW-1:0] ni;
      for (genvar r = 0; r < DEG; r++) begin : g_slot
        assign ni[r] = din[y*Z+z][r];
      end
      outllr_node #(.DEG(DEG), .DW(DW)) u_out (.din(ni), .llr(llr[y*Z+z]), .dout(dout[y*Z+z]));
    end
  end
endmodule
