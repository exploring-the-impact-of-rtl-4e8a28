// tb_check_node: self-checking test of check_node.
// Two instances: the default degree-22 node of this code (network size 32, 3-bit messages,
// offset 0) and a degree-5 node (size 8) with 4-bit messages and offset 1. Random and
// corner-case inputs; every output is compared with the sign-XOR and offset minimum over
// the other inputs, computed by loops.
module tb_check_node;
  int checks = 0, failures = 0;

  logic [21:0][2:0] a_in, a_out;
  logic [4:0][3:0]  b_in, b_out;
  check_node #(.DEG(22), .SIZE(32), .QW(3), .OFFSET(0)) u_a (.din(a_in), .dout(a_out));
  check_node #(.DEG(5),  .SIZE(8),  .QW(4), .OFFSET(1)) u_b (.din(b_in), .dout(b_out));

  function automatic int ref_out(input int mags [], input int sgns [], int i, int qw, int ofs);
    int mn = (1 << (qw-1)) - 1, s = 0;
    for (int k = 0; k < mags.size(); k++)
      if (k != i) begin
        if (mags[k] < mn) mn = mags[k];
        s ^= sgns[k];
      end
    mn = (mn > ofs) ? mn - ofs : 0;
    return (s << (qw-1)) | mn;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ma [], sa [], mb [], sb [];
    ma = new[22]; sa = new[22]; mb = new[5]; sb = new[5];
    for (int it = 0; it < 2000; it++) begin
      for (int k = 0; k < 22; k++) begin
        // bias towards large magnitudes so the minimum is often unique or tied
        a_in[k] = (it % 3 == 0) ? 3'($urandom) : {1'($urandom), 2'(($urandom % 8 == 0) ? $urandom : 3)};
        ma[k] = int'(a_in[k][1:0]); sa[k] = int'(a_in[k][2]);
      end
      for (int k = 0; k < 5; k++) begin
        b_in[k] = 4'($urandom);
        mb[k] = int'(b_in[k][2:0]); sb[k] = int'(b_in[k][3]);
      end
      #1;
      for (int i = 0; i < 22; i++) begin
        checks++;
        if (int'(a_out[i]) != ref_out(ma, sa, i, 3, 0)) begin
          failures++;
          if (failures < 10) $display("FAIL deg22 out %0d got %h exp %h", i, a_out[i], ref_out(ma, sa, i, 3, 0));
        end
      end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (int'(b_out[i]) != ref_out(mb, sb, i, 4, 1)) begin
          failures++;
          if (failures < 10) $display("FAIL deg5 out %0d got %h exp %h", i, b_out[i], ref_out(mb, sb, i, 4, 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
