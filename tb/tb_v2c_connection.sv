// tb_v2c_connection: checks the variable-to-check routing against the expanded matrix
// (unique tag per VN-side slot, compared edge by edge), and that V2C followed by C2V brings
// every used VN-side slot back to itself.
module tb_v2c_connection;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [13:0] vn_out [N_VN][VDEG_MAX];
  logic [13:0] cn_in  [N_CN][CDEG_MAX];
  logic [13:0] back   [N_VN][VDEG_MAX];
  v2c_connection #(.W(14)) dut   (.vn_out(vn_out), .cn_in(cn_in));
  c2v_connection #(.W(14)) u_inv (.cn_out(cn_in), .vn_in(back));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N_VN; n++)
      for (int r = 0; r < VDEG_MAX; r++) vn_out[n][r] = 14'(n * VDEG_MAX + r + 1);
    #1;
    for (int m = 0; m < N_CN; m++) begin
      automatic int j = m / Z, z = m % Z, c = 0;
      for (int y = 0; y < NB; y++)
        if (H_BASE[j][y] >= 0) begin
          automatic int n = y*Z + (z + H_BASE[j][y]) % Z, r = 0;
          for (int k = 0; k < j; k++) if (H_BASE[k][y] >= 0) r++;
          checks++;
          if (cn_in[m][c] != vn_out[n][r]) begin
            failures++;
            if (failures < 10) $display("FAIL cn %0d slot %0d", m, c);
          end
          c++;
        end
      for (; c < CDEG_MAX; c++) begin
        checks++;
        if (cn_in[m][c] != '0) failures++;
      end
    end
    for (int n = 0; n < N_VN; n++) begin
      automatic int d = 0;
      for (int j = 0; j < MB; j++) if (H_BASE[j][n / Z] >= 0) d++;
      for (int r = 0; r < d; r++) begin
        checks++;
        if (back[n][r] != vn_out[n][r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
