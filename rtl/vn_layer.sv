// vn_layer: all N_VN = NB*Z variable nodes of one iteration, side by side.
//
// The Z variable nodes of block column y share the degree VN_DEG[y] and an adder network of
// size net_size(VN_DEG[y]). Each takes its channel LLR and the first VN_DEG[y] slots of its
// bus entry and drives the same output slots; unused slots are driven with 0. Messages are
// DW-bit two's complement. Purely combinational.
module vn_layer
  import ldpc_pkg::*;
#(
  parameter int unsigned DW = DWIDTH
) (
  input  logic [DW-1:0] din  [N_VN][VDEG_MAX],
  input  logic [DW-1:0] llr  [N_VN],
  output logic [DW-1:0] dout [N_VN][VDEG_MAX]
);
  for (genvar y = 0; y < NB; y++) begin : g_col
    localparam int unsigned DEG = VN_DEG[y];
    for (genvar z = 0; z < Z; z++) begin : g_vn
      logic [DEG-1:0][DW-1:0] ni, no;
      for (genvar r = 0; r < VDEG_MAX; r++) begin : g_slot
        if (r < DEG) begin : g_con
          assign ni[r] = din[y*Z+z][r];
          assign dout[y*Z+z][r] = no[r];
        end else begin : g_nc
          assign dout[y*Z+z][r] = '0;
        end
      end
      variable_node #(.DEG(DEG), .SIZE(net_size(DEG)), .DW(DW)) u_vn (
        .din (ni), .llr(llr[y*Z+z]), .dout(no)
      );
    end
  end
endmodule
