// tb_outllr_layer: random messages and channel LLRs into all 648 a-posteriori LLR
// calculators; each output is compared with clip(sum of the node's used slots, llr) + llr.
// Unused slots carry random data and must be ignored.
module tb_outllr_layer;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  int checks = 0, failures = 0, clips = 0;

  logic [DWIDTH-1:0] din  [N_VN][VDEG_MAX];
  logic [DWIDTH-1:0] llr  [N_VN];
  logic [DWIDTH-1:0] dout [N_VN];
  outllr_layer dut (.din(din), .llr(llr), .dout(dout));

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
        automatic int d = 0, tot = 0, exp;
        for (int j = 0; j < MB; j++) if (H_BASE[j][n / Z] >= 0) d++;
        for (int r = 0; r < d; r++) tot += int'($signed(din[n][r]));
        exp = clip_add(tot, int'($signed(llr[n])), clips);
        checks++;
        if (int'($signed(dout[n])) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL node %0d got %0d exp %0d", n, $signed(dout[n]), exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
