// tb_variable_node: self-checking test of variable_node.
// Instances of degree 4 (size 4), 3 (size 4) and 2 (size 2) with 7-bit messages. Inputs are
// random over the full 7-bit range, which drives the clipping often; each output is
// compared with clip(sum of the other inputs, llr) + llr computed with integers.
module tb_variable_node;
  int checks = 0, failures = 0, clipped = 0;

  logic signed [3:0][6:0] d4_in, d4_out;
  logic signed [2:0][6:0] d3_in, d3_out;
  logic signed [1:0][6:0] d2_in, d2_out;
  logic signed [6:0]      llr;
  variable_node #(.DEG(4), .SIZE(4), .DW(7)) u4 (.din(d4_in), .llr(llr), .dout(d4_out));
  variable_node #(.DEG(3), .SIZE(4), .DW(7)) u3 (.din(d3_in), .llr(llr), .dout(d3_out));
  variable_node #(.DEG(2), .SIZE(2), .DW(7)) u2 (.din(d2_in), .llr(llr), .dout(d2_out));

  function automatic int ref_vn(input int v [], int i, int t);
    int r = 0, hi = 63 - t, lo = -63 - t;
    for (int k = 0; k < v.size(); k++) if (k != i) r += v[k];
    if (r > hi) begin r = hi; clipped++; end
    if (r < lo) begin r = lo; clipped++; end
    return r + t;
  endfunction

  task automatic cmp(int got, int exp, string what, int i);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s out %0d got %0d exp %0d", what, i, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v4 [], v3 [], v2 [];
    v4 = new[4]; v3 = new[3]; v2 = new[2];
    for (int it = 0; it < 3000; it++) begin
      automatic int sc = (it % 2) ? 127 : 31;   // small values half of the time
      llr = 7'(int'($urandom_range(126)) - 63);
      for (int k = 0; k < 4; k++) begin
        v4[k] = int'($urandom_range(sc)) - sc/2;
        if (v4[k] < -63) v4[k] = -63;
        if (v4[k] > 63) v4[k] = 63;
        d4_in[k] = 7'(v4[k]);
      end
      for (int k = 0; k < 3; k++) begin v3[k] = v4[k]; d3_in[k] = 7'(v3[k]); end
      for (int k = 0; k < 2; k++) begin v2[k] = v4[k+2]; d2_in[k] = 7'(v2[k]); end
      #1;
      for (int i = 0; i < 4; i++) cmp(int'($signed(d4_out[i])), ref_vn(v4, i, int'(llr)), "deg4", i);
      for (int i = 0; i < 3; i++) cmp(int'($signed(d3_out[i])), ref_vn(v3, i, int'(llr)), "deg3", i);
      for (int i = 0; i < 2; i++) cmp(int'($signed(d2_out[i])), ref_vn(v2, i, int'(llr)), "deg2", i);
    end
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("clipping events: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
