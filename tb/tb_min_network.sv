// tb_min_network: self-checking test of min_network.
// Drives random vectors and corner cases (all ones, alternating) into networks of sizes
// 2, 4, 8, 32, and compares every output with the minimum of all the other
// inputs, computed by a plain loop.
module tb_min_network;
  int checks = 0, failures = 0;

  localparam int W = 2;
  logic [2-1:0][W-1:0] din_2;
  logic [2-1:0][W-1:0] dout_2;
  min_network #(.SIZE(2), .W(W)) u_2 (.din(din_2), .dout(dout_2));
  logic [4-1:0][W-1:0] din_4;
  logic [4-1:0][W-1:0] dout_4;
  min_network #(.SIZE(4), .W(W)) u_4 (.din(din_4), .dout(dout_4));
  logic [8-1:0][W-1:0] din_8;
  logic [8-1:0][W-1:0] dout_8;
  min_network #(.SIZE(8), .W(W)) u_8 (.din(din_8), .dout(dout_8));
  logic [32-1:0][W-1:0] din_32;
  logic [32-1:0][W-1:0] dout_32;
  min_network #(.SIZE(32), .W(W)) u_32 (.din(din_32), .dout(dout_32));

  function automatic longint ref_excl(input longint v [], int i);
    longint acc = 0;
    bit first = 1;
    for (int k = 0; k < v.size(); k++)
      if (k != i) begin
        if (first) begin acc = v[k]; first = 0; end
        else acc = (v[k] < acc) ? v[k] : acc;
      end
    return acc;
  endfunction

  task automatic check_2(int mode);
    longint v [];
    v = new[2];
    for (int k = 0; k < 2; k++) begin
      din_2[k] = (mode == 0) ? W'($urandom) : (mode == 1) ? '1 : W'(k % 2);
      v[k] = longint'(din_2[k]);
    end
    #1;
    for (int i = 0; i < 2; i++) begin
      automatic longint got = longint'(dout_2[i]);
      checks++;
      if (got != ref_excl(v, i)) begin
        failures++;
        if (failures < 10) $display("FAIL size 2 output %0d got %0d expected %0d", i, got, ref_excl(v, i));
      end
    end
  endtask

  task automatic check_4(int mode);
    longint v [];
    v = new[4];
    for (int k = 0; k < 4; k++) begin
      din_4[k] = (mode == 0) ? W'($urandom) : (mode == 1) ? '1 : W'(k % 2);
      v[k] = longint'(din_4[k]);
    end
    #1;
    for (int i = 0; i < 4; i++) begin
      automatic longint got = longint'(dout_4[i]);
      checks++;
      if (got != ref_excl(v, i)) begin
        failures++;
        if (failures < 10) $display("FAIL size 4 output %0d got %0d expected %0d", i, got, ref_excl(v, i));
      end
    end
  endtask

  task automatic check_8(int mode);
    longint v [];
    v = new[8];
    for (int k = 0; k < 8; k++) begin
      din_8[k] = (mode == 0) ? W'($urandom) : (mode == 1) ? '1 : W'(k % 2);
      v[k] = longint'(din_8[k]);
    end
    #1;
    for (int i = 0; i < 8; i++) begin
      automatic longint got = longint'(dout_8[i]);
      checks++;
      if (got != ref_excl(v, i)) begin
        failures++;
        if (failures < 10) $display("FAIL size 8 output %0d got %0d expected %0d", i, got, ref_excl(v, i));
      end
    end
  endtask

  task automatic check_32(int mode);
    longint v [];
    v = new[32];
    for (int k = 0; k < 32; k++) begin
      din_32[k] = (mode == 0) ? W'($urandom) : (mode == 1) ? '1 : W'(k % 2);
      v[k] = longint'(din_32[k]);
    end
    #1;
    for (int i = 0; i < 32; i++) begin
      automatic longint got = longint'(dout_32[i]);
      checks++;
      if (got != ref_excl(v, i)) begin
        failures++;
        if (failures < 10) $display("FAIL size 32 output %0d got %0d expected %0d", i, got, ref_excl(v, i));
      end
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
    for (int it = 0; it < 300; it++) begin
      check_2(it < 2 ? it + 1 : 0);
      check_4(it < 2 ? it + 1 : 0);
      check_8(it < 2 ? it + 1 : 0);
      check_32(it < 2 ? it + 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
