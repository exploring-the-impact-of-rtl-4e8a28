// v2c_connection: routes variable-to-check messages from variable-node slots to
// check-node slots (the inverse of c2v_connection).
//
// Check node m = j*Z+z receives in slot c the message of variable node
// n = y*Z + (z + H_BASE[j][y]) mod Z, where y is the c-th connected column of row j; inside
// that variable node the message sits in the slot of row j among the connected rows of
// column y. Slots beyond a node's degree are driven with 0. Pure wiring.
module v2c_connection
  import ldpc_pkg::*;
#(
  parameter int unsigned W = QBITS
) (
  input  logic [W-1:0] vn_out [N_VN][VDEG_MAX],
  output logic [W-1:0] cn_in  [N_CN][CDEG_MAX]
);
  for (genvar j = 0; j < MB; j++) begin : g_row
    for (genvar z = 0; z < Z; z++) begin : g_z
      for (genvar c = 0; c < CDEG_MAX; c++) begin : g_slot
        if (c < CN_DEG[j]) begin : g_con
          localparam int Y = CN_COL[j*CDEG_MAX+c];
          assign cn_in[j*Z+z][c] = vn_out[Y*Z + (z + H_BASE[j][Y]) % Z][VN_SLOT[j*NB+Y]];
        end else begin : g_nc
          assign cn_in[j*Z+z][c] = '0;
        end
      end
    end
  end
endmodule
