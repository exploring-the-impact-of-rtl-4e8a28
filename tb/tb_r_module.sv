// tb_r_module: exhaustive test of r_module for every table version, plus the resize
// fallback (a parameter set with no table). Expected values: sign-magnitude index -> +-R*.
module tb_r_module;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0]        din;
  logic signed [6:0] o1, o2, o3, o0;
  logic [3:0]        din4;
  logic signed [6:0] o4;
  r_module #(.DW_IN(3), .DW_OUT(7), .VERSION(1)) u1 (.din(din), .dout(o1));
  r_module #(.DW_IN(3), .DW_OUT(7), .VERSION(2)) u2 (.din(din), .dout(o2));
  r_module #(.DW_IN(3), .DW_OUT(7), .VERSION(3)) u3 (.din(din), .dout(o3));
  r_module #(.DW_IN(3), .DW_OUT(7), .VERSION(0)) u0 (.din(din), .dout(o0));    // no table
  r_module #(.DW_IN(4), .DW_OUT(7), .VERSION(1)) u4 (.din(din4), .dout(o4));   // no 4-bit table

  // hand-copied expectations, independent of the package's encoding
  int exp_mag [3][4] = '{'{2, 8, 16, 30}, '{2, 7, 14, 28}, '{4, 12, 24, 48}};

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 8; d++) begin
      automatic int s = (d >= 4) ? -1 : 1;
      din = 3'(d);
      #1;
      cmp(int'(o1), s * exp_mag[0][d % 4], $sformatf("v1 d=%0d", d));
      cmp(int'(o2), s * exp_mag[1][d % 4], $sformatf("v2 d=%0d", d));
      cmp(int'(o3), s * exp_mag[2][d % 4], $sformatf("v3 d=%0d", d));
      cmp(int'(o0), s * (d % 4), $sformatf("resize d=%0d", d));
    end
    for (int d = 0; d < 16; d++) begin
      din4 = 4'(d);
      #1;
      cmp(int'(o4), ((d >= 8) ? -1 : 1) * (d % 8), $sformatf("resize4 d=%0d", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
