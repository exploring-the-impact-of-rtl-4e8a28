// tb_vn_layer: random 7-bit messages and channel LLRs into all 648 variable nodes; each
// used output slot is compared with clip(sum of the node's other used slots, llr) + llr,
// unused slots must be 0. The node degree is counted from the base matrix here.
module tb_vn_layer;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  int checks = 0, failures = 0, clips = 0;

  logic [DWIDTH-1:0] din  [N_VN][VDEG_MAX];
  logic [DWIDTH-1:0] llr  [N_VN];
  logic [DWIDTH-1:0] dout [N_VN][VDEG_MAX];
  vn_layer dut (.din(din), .llr(llr), .dout(dout));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 10; it++) begin
      for (int n = 0; n < N_VN; n++) begin
        llr[n] = DWIDTH'(int'($urandom_range(126)) - 63);
        for (int r = 0; r < VDEG_MAX; r++) din[n][r] = DWIDTH'(int'($urandom_range(126)) - 63);
      end
      #1;
      for (int n = 0; n < N_VN; n++) begin
        automatic int d = 0, tot = 0;
        for (int j = 0; j < MB; j++) if (H_BASE[j][n / Z] >= 0) d++;
        for (int r = 0; r < d; r++) tot += int'($signed(din[n][r]));
        for (int r = 0; r < VDEG_MAX; r++) begin
          automatic int exp = (r < d) ? clip_add(tot - int'($signed(din[n][r])), int'($signed(llr[n])), clips) : 0;
          checks++;
          if (int'($signed(dout[n][r])) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL vn %0d slot %0d got %0d exp %0d", n, r, $signed(dout[n][r]), exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
