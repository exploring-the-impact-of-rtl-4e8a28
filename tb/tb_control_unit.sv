// tb_control_unit: checks the ready/valid control with a short pipeline (LATENCY = 5).
// 1) a single frame with the receiver ready: out_valid must rise exactly LATENCY cycles
//    after the frame was accepted and last one cycle;
// 2) random in_valid / receiver_ready traffic: a cycle-level model of the published rule
//    (advance when no result waits or the receiver takes it) is compared every cycle, every
//    accepted frame must come out exactly once and in order, and stalls must occur.
module tb_control_unit;
  localparam int L = 5;
  int checks = 0, failures = 0, stalls = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, receiver_ready = 1;
  logic decoder_ready, out_valid, enable;
  control_unit #(.LATENCY(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: per-level frame ids (0 = empty)
  int model [L];
  int next_id = 1, expect_id = 1;

  initial begin
    int t_acc, t_out;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cmp(!out_valid && decoder_ready && enable, "idle after reset");
    // ---- 1) latency of one frame ----
    in_valid = 1;
    @(posedge clk); t_acc = $time / 10;
    @(negedge clk); in_valid = 0;
    while (!out_valid) begin @(posedge clk); @(negedge clk); end
    t_out = $time / 10;
    cmp(t_out - t_acc == L, $sformatf("latency %0d cycles, expected %0d", t_out - t_acc, L));
    @(negedge clk);
    cmp(!out_valid, "out_valid lasts one cycle");
    repeat (L) @(negedge clk);
    // ---- 2) random traffic against the model ----
    for (int cyc = 0; cyc < 3000; cyc++) begin
      automatic bit m_out, m_en;
      in_valid       = ($urandom % 3) != 0;
      receiver_ready = (cyc % 400 < 200) ? 1'b1 : (($urandom % 4) == 0);
      #1;
      m_out = model[L-1] != 0;
      m_en  = !m_out || receiver_ready;
      cmp(out_valid == m_out, "out_valid vs model");
      cmp(enable == m_en && decoder_ready == m_en, "enable/decoder_ready vs model");
      if (m_out && !receiver_ready) stalls++;
      if (m_out && receiver_ready) begin
        cmp(model[L-1] == expect_id, "frames delivered in order, once");
        expect_id++;
      end
      @(posedge clk);
      if (m_en) begin
        for (int i = L-1; i > 0; i--) model[i] = model[i-1];
        model[0] = in_valid ? next_id : 0;
        if (in_valid) next_id++;
      end
      @(negedge clk);
    end
    cmp(stalls > 0, "stall happened");
    $display("frames in %0d, out %0d, stall cycles %0d", next_id - 1, expect_id - 1, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
