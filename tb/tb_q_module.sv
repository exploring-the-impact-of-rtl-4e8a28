// tb_q_module: exhaustive test of q_module over all 128 input values for each table
// version, plus the saturating resize fallback. Expected index: 0 up to tau_0, j between
// tau_(j-1) (exclusive) and tau_j, 3 above tau_2; sign bit set for negative inputs.
module tb_q_module;
  int checks = 0, failures = 0;

  logic signed [6:0] din;
  logic [2:0]        o1, o2, o3, o0;
  q_module #(.DW_IN(7), .DW_OUT(3), .VERSION(1)) u1 (.din(din), .dout(o1));
  q_module #(.DW_IN(7), .DW_OUT(3), .VERSION(2)) u2 (.din(din), .dout(o2));
  q_module #(.DW_IN(7), .DW_OUT(3), .VERSION(3)) u3 (.din(din), .dout(o3));
  q_module #(.DW_IN(7), .DW_OUT(3), .VERSION(9)) u0 (.din(din), .dout(o0));  // no table

  int tau [3][3] = '{'{4, 11, 22}, '{4, 10, 20}, '{7, 17, 35}};

  function automatic int expq(int v, int h);
    automatic int m = (h < 0) ? -h : h, j;
    if (m <= tau[v][0]) j = 0;
    else if (m <= tau[v][1]) j = 1;
    else if (m <= tau[v][2]) j = 2;
    else j = 3;
    return ((h < 0) ? 4 : 0) + j;
  endfunction

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
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
    for (int h = -64; h < 64; h++) begin
      automatic int m = (h < 0) ? -h : h;
      din = 7'(h);
      #1;
      cmp(int'(o1), expq(0, h), $sformatf("v1 h=%0d", h));
      cmp(int'(o2), expq(1, h), $sformatf("v2 h=%0d", h));
      cmp(int'(o3), expq(2, h), $sformatf("v3 h=%0d", h));
      cmp(int'(o0), ((h < 0) ? 4 : 0) + ((m > 3) ? 3 : m), $sformatf("resize h=%0d", h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
