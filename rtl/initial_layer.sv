// initial_layer: hands the quantized channel LLRs straight to the first check node layer.
//
// In the first iteration every variable node would only forward its own channel LLR, so no
// variable node layer is built: this layer wires quantized LLR n to every check-node input
// slot that the parity-check matrix connects to variable node n. Check node m = j*Z+z takes,
// in slot c, variable node n = y*Z + (z + H_BASE[j][y]) mod Z, where y is the c-th
// connected column of block row j. Slots beyond a node's degree are driven with 0.
// Pure wiring, no logic.
module initial_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned W = QBITS
) (
  input  logic [W-1:0] llr_q [N_VN],
  output logic [W-1:0] cn_in [N_CN][CDEG_MAX]
);
  for (genvar j = 0; j < MB; j++) begin : g_row
    for (genvar z = 0; z < Z; z++) begin : g_z
      for (genvar c = 0; c < CDEG_MAX; c++) begin : g_slot
        if (c < CN_DEG[j]) begin : g_con
          localparam int Y = CN_COL[j*CDEG_MAX+c];
          assign cn_in[j*Z+z][c] = llr_q[Y*Z + (z + H_BASE[j][Y]) % Z];
        end else begin : g_nc
          assign cn_in[j*Z+z][c] = '0;
        end
      end
    end
  end
endmodule
