// tb_outllr_node: self-checking test of outllr_node.
// Degree-4 and degree-2 instances; random messages and channel LLRs; each output is compared
// with clip(sum of all inputs, llr) + llr computed with integers.
module tb_outllr_node;
  int checks = 0, failures = 0, clipped = 0;

  logic signed [3:0][6:0] d4_in;
  logic signed [1:0][6:0] d2_in;
  logic signed [6:0]      llr, o4, o2;
  outllr_node #(.DEG(4), .DW(7)) u4 (.din(d4_in), .llr(llr), .dout(o4));
  outllr_node #(.DEG(2), .DW(7)) u2 (.din(d2_in), .llr(llr), .dout(o2));

  function automatic int ref_app(input int v [], int t);
    int r = 0, hi = 63 - t, lo = -63 - t;
    foreach (v[k]) r += v[k];
    if (r > hi) begin r = hi; clipped++; end
    if (r < lo) begin r = lo; clipped++; end
    return r + t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v4 [], v2 [];
    v4 = new[4]; v2 = new[2];
    for (int it = 0; it < 3000; it++) begin
      automatic int sc = (it % 2) ? 126 : 30;
      llr = 7'(int'($urandom_range(126)) - 63);
      for (int k = 0; k < 4; k++) begin
        v4[k] = int'($urandom_range(sc)) - sc/2;
        d4_in[k] = 7'(v4[k]);
      end
      for (int k = 0; k < 2; k++) begin v2[k] = v4[k]; d2_in[k] = 7'(v2[k]); end
      #1;
      checks += 2;
      if (int'(o4) != ref_app(v4, int'(llr))) begin failures++; if (failures < 10) $display("FAIL deg4 got %0d exp %0d", o4, ref_app(v4, int'(llr))); end
      if (int'(o2) != ref_app(v2, int'(llr))) begin failures++; if (failures < 10) $display("FAIL deg2 got %0d exp %0d", o2, ref_app(v2, int'(llr))); end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
