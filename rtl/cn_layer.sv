// cn_layer: all N_CN = MB*Z check nodes of one iteration, side by side.
//
// The Z check nodes of block row j share the degree CN_DEG[j] and a calculation network of
// size net_size(CN_DEG[j]); each takes the first CN_DEG[j] slots of its bus entry and
// drives the same slots of its output entry. Unused slots are driven with 0.
// Messages are QW-bit sign-magnitude. Purely combinational.
module cn_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned QW  = QBITS,
  parameter int unsigned OFS = OFFSET
) (
  input  logic [QW-1:0] din  [N_CN][CDEG_MAX],
  output logic [QW-1:0] dout [N_CN][CDEG_MAX]
);
  for (genvar j = 0; j < MB; j++) begin : g_row
    localparam int unsigned DEG = CN_DEG[j];
    for (genvar z = 0; z < Z; z++) begin : g_cn
      logic [DEG-1:0][QW-1:0] ni, no;
      for (genvar c = 0; c < CDEG_MAX; c++) begin : g_slot
        if (c < DEG) begin : g_con
          assign ni[c] = din[j*Z+z][c];
          assign dout[j*Z+z][c] = no[c];
        end else begin : g_nc
          assign dout[j*Z+z][c] = '0;
        end
      end
      check_node #(.DEG(DEG), .SIZE(net_size(DEG)), .QW(QW), .OFFSET(OFS)) u_cn (
        .din (ni), .dout(no)
      );
    end
  end
endmodule
