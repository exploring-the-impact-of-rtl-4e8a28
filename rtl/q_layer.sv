// q_layer: ROWS x COLS quantization modules of one table version in parallel.
//
// Used with ROWS = N_VN, COLS = VDEG_MAX behind a variable node layer (one module per output slot),
// and with ROWS = N_VN, COLS = 1 as the Q_0 layer that quantizes the channel LLRs right after the
// input register. Purely combinational.
module q_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned ROWS    = N_VN,
  parameter int unsigned COLS    = VDEG_MAX,
  parameter int unsigned VERSION = 2,
  parameter int unsigned DW_IN   = DWIDTH,
  parameter int unsigned DW_OUT  = QBITS
) (
  input  logic [DW_IN-1:0]  din  [ROWS][COLS],
  output logic [DW_OUT-1:0] dout [ROWS][COLS]
);
  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar k = 0; k < COLS; k++) begin : g_q
      q_module #(.DW_IN(DW_IN), .DW_OUT(DW_OUT), .VERSION(VERSION)) u_q (
        .din (din[i][k]), .dout(dout[i][k])
      );
    end
  end
endmodule
