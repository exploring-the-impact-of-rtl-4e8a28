// tb_cn_layer: random sign-magnitude messages into all 108 check nodes; every used output
// slot is compared with the XOR of the other slots' signs and the minimum of their
// magnitudes (offset 0), unused slots must be 0.
module tb_cn_layer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [QBITS-1:0] din  [N_CN][CDEG_MAX];
  logic [QBITS-1:0] dout [N_CN][CDEG_MAX];
  cn_layer dut (.din(din), .dout(dout));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20; it++) begin
      for (int m = 0; m < N_CN; m++)
        for (int c = 0; c < CDEG_MAX; c++)
          din[m][c] = (it % 2) ? QBITS'($urandom) : {1'($urandom), QMAG'(($urandom % 6 == 0) ? $urandom : '1)};
      #1;
      for (int m = 0; m < N_CN; m++) begin
        automatic int d = CDEG_MAX;   // every row of this code has the maximum degree
        for (int c = 0; c < d; c++) begin
          automatic int mn = N_LEVELS - 1, s = 0;
          for (int k = 0; k < d; k++)
            if (k != c) begin
              if (int'(din[m][k][QMAG-1:0]) < mn) mn = int'(din[m][k][QMAG-1:0]);
              s ^= int'(din[m][k][QBITS-1]);
            end
          checks++;
          if (int'(dout[m][c]) != s * N_LEVELS + mn) begin
            failures++;
            if (failures < 10) $display("FAIL cn %0d slot %0d got %0d exp %0d", m, c, dout[m][c], s*N_LEVELS+mn);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
