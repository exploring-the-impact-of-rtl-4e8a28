// tb_conversion_layer: random a-posteriori LLRs (with zeros); decoded bit i must be 1
// exactly when LLR i is negative, for the 540 information positions.
module tb_conversion_layer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [DWIDTH-1:0] llr [N_VN];
  logic [K_INFO-1:0] bits;
  conversion_layer dut (.llr(llr), .bits(bits));

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 10; it++) begin
      for (int n = 0; n < N_VN; n++) llr[n] = ($urandom % 5 == 0) ? '0 : DWIDTH'($urandom);
      #1;
      for (int i = 0; i < K_INFO; i++) begin
        checks++;
        if (bits[i] != ($signed(llr[i]) < 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
