// r_layer: ROWS x COLS reconstruction modules of one table version in parallel.
//
// Used with ROWS = N_VN, COLS = VDEG_MAX in front of a variable node or a-posteriori LLR layer
// (one module per variable-node input slot), and with ROWS = N_VN, COLS = 1 as the R_0 layer that
// rebuilds the channel LLRs from their quantized form. Purely combinational.
module r_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned ROWS    = N_VN,
  parameter int unsigned COLS    = VDEG_MAX,
  parameter int unsigned VERSION = 2,
  parameter int unsigned DW_IN   = QBITS,
  parameter int unsigned DW_OUT  = DWIDTH
) (
  input  logic [DW_IN-1:0]  din  [ROWS][COLS],
  output logic [DW_OUT-1:0] dout [ROWS][COLS]
);
  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar k = 0; k < COLS; k++) begin : g_r
      r_module #(.DW_IN(DW_IN), .DW_OUT(DW_OUT), .VERSION(VERSION)) u_r (
        .din (din[i][k]), .dout(dout[i][k])
      );
    end
  end
endmodule
