// tb_ldpc_pkg: checks the derived constants of ldpc_pkg against values counted by hand for
// the 802.11n (648,540) rate-5/6 base matrix, compares every shift value of H_BASE with an
// independent copy of that matrix, and checks that the connection tables are mutually
// consistent (slot c of row j names column y, and the CN-side slot of (j,y) is c again).
module tb_ldpc_pkg;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // column degrees counted from the printed matrix
  int vdeg_exp [24] = '{4,4,4,4,4,4,4,4,4,4,4,4,3,4,4,4,4,4,4,4,3,2,2,2};

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IEEE 802.11n, rate 5/6, Z = 27 (-1: zero block)
  int h_exp [4][24] = '{
    '{17,13, 8,21, 9, 3,18,12,10, 0, 4,15,19, 2, 5,10,26,19,13,13, 1, 0,-1,-1},
    '{ 3,12,11,14,11,25, 5,18, 0, 9, 2,26,26,10,24, 7,14,20, 4, 2,-1, 0, 0,-1},
    '{22,16, 4, 3,10,21,12, 5,21,14,19, 5,-1, 8, 5,18,11, 5, 5,15, 0,-1, 0, 0},
    '{ 7, 7,14,14, 4,16,16,24,24,10, 1, 7,15, 6,10,26, 8,18,21,14, 1,-1,-1, 0}};

  initial begin
    for (int j = 0; j < 4; j++)
      for (int y = 0; y < 24; y++) cmp(H_BASE[j][y], h_exp[j][y], $sformatf("H_BASE[%0d][%0d]", j, y));
    cmp(N_VN, 648, "N_VN");
    cmp(N_CN, 108, "N_CN");
    cmp(K_INFO, 540, "K_INFO");
    cmp(QMAX, 63, "QMAX");
    cmp(CDEG_MAX, 22, "CDEG_MAX");
    cmp(VDEG_MAX, 4, "VDEG_MAX");
    for (int j = 0; j < MB; j++) cmp(CN_DEG[j], 22, $sformatf("CN_DEG[%0d]", j));
    for (int y = 0; y < NB; y++) cmp(VN_DEG[y], vdeg_exp[y], $sformatf("VN_DEG[%0d]", y));
    cmp(net_size(22), 32, "net_size(22)");
    cmp(net_size(4), 4, "net_size(4)");
    cmp(net_size(3), 4, "net_size(3)");
    cmp(net_size(2), 2, "net_size(2)");
    cmp(net_size(5), 8, "net_size(5)");
    for (int j = 0; j < MB; j++)
      for (int c = 0; c < CN_DEG[j]; c++) begin
        automatic int y = CN_COL[j*CDEG_MAX + c];
        checks++;
        if (y < 0 || H_BASE[j][y] < 0) begin failures++; $display("FAIL CN_COL %0d %0d", j, c); end
        else cmp(CN_SLOT[j*NB + y], c, "CN_SLOT");
      end
    for (int y = 0; y < NB; y++)
      for (int r = 0; r < VN_DEG[y]; r++) begin
        automatic int j = VN_ROW[y*VDEG_MAX + r];
        checks++;
        if (j < 0 || H_BASE[j][y] < 0) begin failures++; $display("FAIL VN_ROW %0d %0d", y, r); end
        else cmp(VN_SLOT[j*NB + y], r, "VN_SLOT");
      end
    cmp(q_star(1, 4), 0, "q_star(1,4)");
    cmp(q_star(1, 5), 1, "q_star(1,5)");
    cmp(q_star(3, 35), 2, "q_star(3,35)");
    cmp(q_star(3, 36), 3, "q_star(3,36)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
