// tb_initial_layer: checks that every check-node slot receives the quantized LLR of the
// variable node the parity-check matrix connects it to, and unused slots are 0. The
// expected routing is rebuilt here by scanning the expanded matrix row by row.
module tb_initial_layer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [QBITS-1:0] llr_q [N_VN];
  logic [QBITS-1:0] cn_in [N_CN][CDEG_MAX];
  initial_layer #(.W(QBITS)) dut (.llr_q(llr_q), .cn_in(cn_in));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4; it++) begin
      for (int n = 0; n < N_VN; n++) llr_q[n] = (it == 0) ? QBITS'(n) : QBITS'($urandom);
      #1;
      for (int m = 0; m < N_CN; m++) begin
        automatic int j = m / Z, z = m % Z, c = 0;
        // walk the expanded row m: columns in increasing order
        for (int n = 0; n < N_VN; n++) begin
          automatic int y = n / Z;
          if (H_BASE[j][y] >= 0 && (n % Z) == (z + H_BASE[j][y]) % Z) begin
            checks++;
            if (cn_in[m][c] != llr_q[n]) begin
              failures++;
              if (failures < 10) $display("FAIL cn %0d slot %0d", m, c);
            end
            c++;
          end
        end
        for (; c < CDEG_MAX; c++) begin
          checks++;
          if (cn_in[m][c] != '0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
