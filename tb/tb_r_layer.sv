// tb_r_layer: a full-size per-edge R layer (version 2) and an R_0 layer (version 1, one
// column) with random indices; every output is compared with the reference reconstruction.
module tb_r_layer;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [QBITS-1:0]  a_in  [N_VN][VDEG_MAX];
  logic [DWIDTH-1:0] a_out [N_VN][VDEG_MAX];
  logic [QBITS-1:0]  b_in  [N_VN][1];
  logic [DWIDTH-1:0] b_out [N_VN][1];
  r_layer #(.ROWS(N_VN), .COLS(VDEG_MAX), .VERSION(2)) u_a (.din(a_in), .dout(a_out));
  r_layer #(.ROWS(N_VN), .COLS(1), .VERSION(1))        u_b (.din(b_in), .dout(b_out));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5; it++) begin
      for (int n = 0; n < N_VN; n++) begin
        b_in[n][0] = QBITS'($urandom);
        for (int r = 0; r < VDEG_MAX; r++) a_in[n][r] = QBITS'($urandom);
      end
      #1;
      for (int n = 0; n < N_VN; n++) begin
        for (int r = 0; r < VDEG_MAX; r++) begin
          checks++;
          if (int'($signed(a_out[n][r])) != ref_r(2, int'(a_in[n][r]))) failures++;
        end
        checks++;
        if (int'($signed(b_out[n][0])) != ref_r(1, int'(b_in[n][0]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
