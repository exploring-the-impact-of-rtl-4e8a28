// c2v_connection: routes check-to-variable messages from check-node slots to
// variable-node slots.
//
// Variable node n = y*Z+z receives in slot r the message of check node
// m = j*Z + (Z + z - H_BASE[j][y]) mod Z, where j is the r-th connected block row of column y;
// inside that check node the message sits in the slot of column y among the connected
// columns of row j. Slots beyond a node's degree are driven with 0. Pure wiring.
module c2v_connection
  import ldpc_pkg::*;
#(
  parameter int unsigned W = QBITS
) (
  input  logic [W-1:0] cn_out [N_CN][CDEG_MAX],
  output logic [W-1:0] vn_in  [N_VN][VDEG_MAX]
);
  for (genvar y = 0; y < NB; y++) begin : g_col
    for (genvar z = 0; z < Z; z++) begin : g_z
      for (genvar r = 0; r < VDEG_MAX; r++) begin : g_slot
        if (r < VN_DEG[y]) begin : g_con
          localparam int J = VN_ROW[y*VDEG_MAX+r];
          assign vn_in[y*Z+z][r] = cn_out[J*Z + (Z + z - H_BASE[J][y]) % Z][CN_SLOT[J*NB+y]];
        end else begin : g_nc
          assign vn_in[y*Z+z][r] = '0;
        end
      end
    end
  end
endmodule
