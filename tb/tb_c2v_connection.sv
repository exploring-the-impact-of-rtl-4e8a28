// tb_c2v_connection: checks the check-to-variable routing against the expanded
// parity-check matrix. Each CN-side slot gets a unique tag; for every edge (m, n) of the
// expanded matrix the tag of CN m's slot (column order) must appear in VN n's slot (row
// order), and unused VN slots must be 0.
module tb_c2v_connection;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [11:0] cn_out [N_CN][CDEG_MAX];
  logic [11:0] vn_in  [N_VN][VDEG_MAX];
  c2v_connection #(.W(12)) dut (.cn_out(cn_out), .vn_in(vn_in));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < N_CN; m++)
      for (int c = 0; c < CDEG_MAX; c++) cn_out[m][c] = 12'(m * CDEG_MAX + c + 1);
    #1;
    for (int n = 0; n < N_VN; n++) begin
      automatic int y = n / Z, zn = n % Z, r = 0;
      for (int j = 0; j < MB; j++)
        if (H_BASE[j][y] >= 0) begin
          // row of block j connected to VN n, and the CN-side slot of column y in it
          automatic int m = j*Z + (zn - H_BASE[j][y] + Z) % Z, c = 0;
          for (int k = 0; k < y; k++) if (H_BASE[j][k] >= 0) c++;
          checks++;
          if (vn_in[n][r] != cn_out[m][c]) begin
            failures++;
            if (failures < 10) $display("FAIL vn %0d slot %0d got %0d exp %0d", n, r, vn_in[n][r], cn_out[m][c]);
          end
          r++;
        end
      for (; r < VDEG_MAX; r++) begin
        checks++;
        if (vn_in[n][r] != '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
