// tb_ldpc_rcq_decoder: end-to-end test of the decoder at reduced depth (N_ITER = 2).
//
// Frames are noisy codewords of the (648,540) code (random information bits, encoded with
// the dual-diagonal parity structure, BPSK-like LLRs of amplitude 12 plus uniform noise of
// at most +-6, and 2*id positions flipped to a weak LLR of the wrong sign) and a few
// frames of purely random LLRs. For every accepted frame the reference model in
// tb_ldpc_ref_pkg computes the a-posteriori LLRs bit-exactly; all 648 LLRs and 540 bits of
// every result are compared. The test also checks the latency of a frame entering an idle
// decoder (3*N_ITER+1 cycles), holds receiver_ready low for a while to force stalls, sends
// frames back to back, and counts how often each mechanism happened: stalls, input held
// off by decoder_ready, several frames in flight, message clipping, channel errors
// corrected, RCQ table version change between iterations. A mechanism that never happened
// counts as a failure (the version change only when N_ITER > 5).
module tb_ldpc_rcq_decoder;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;

  localparam int NIT     = 2;
  localparam int LAT     = 3*NIT + 1;
  localparam int NFRAMES = 10;
  localparam int GAP     = LAT / NFRAMES + 1;   // frames keep arriving past the first output

  int checks = 0, failures = 0;
  int n_stall = 0, n_held = 0, n_multi = 0, n_clip = 0, n_corrected = 0, n_out = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, receiver_ready = 1;
  logic decoder_ready, out_valid;
  logic [LLR_BITS-1:0] llr_in  [N_VN];
  logic [DWIDTH-1:0]   llr_out [N_VN];
  logic [K_INFO-1:0]   bits_out;

  ldpc_rcq_decoder #(.N_ITER(2)) dut (.*);

  always #5 clk = ~clk;

  // expected results, in order
  typedef struct { int app [N_VN]; int id; } exp_t;
  exp_t q [$];
  int frame_cw_err [NFRAMES];   // channel hard-decision errors per frame
  bit frame_cw     [NFRAMES][N_VN];

  initial begin
    #(64'd10 * (64'd200 + 64'd4 * NFRAMES * LAT));
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_frame(int id, output int llr [N_VN]);
    bit info [K_INFO];
    bit cw [N_VN];
    if (id < 7) begin
      for (int i = 0; i < K_INFO; i++) info[i] = 1'($urandom);
      encode(info, cw);
      for (int n = 0; n < N_VN; n++) llr[n] = chan_llr(cw[n], 12, (id == 0) ? 0 : 6);
      for (int k = 0; k < 2 * id; k++) begin
        automatic int p = $urandom_range(N_VN - 1);
        automatic int m = $urandom_range(6, 1);
        llr[p] = cw[p] ? m : -m;
      end
    end else begin
      for (int n = 0; n < N_VN; n++) begin
        cw[n] = 1'b0;
        llr[n] = int'($urandom_range(126)) - 63;
      end
    end
    frame_cw[id] = cw;
    frame_cw_err[id] = 0;
    for (int n = 0; n < N_VN; n++) if ((llr[n] < 0) != cw[n]) frame_cw_err[id]++;
  endfunction

  // ------------- output side: check every result -------------
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !receiver_ready) n_stall++;
    if (in_valid && !decoder_ready) n_held++;
    if (q.size() > 1) n_multi++;
    if (out_valid && receiver_ready) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        automatic exp_t e = q.pop_front();
        automatic int bad = 0, errs = 0;
        for (int n = 0; n < N_VN; n++) if (int'($signed(llr_out[n])) != e.app[n]) bad++;
        for (int i = 0; i < K_INFO; i++) if (bits_out[i] != (e.app[i] < 0)) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL frame %0d: %0d mismatching values", e.id, bad);
        end
        if (e.id < 7) begin
          for (int i = 0; i < K_INFO; i++) if (bits_out[i] != frame_cw[e.id][i]) errs++;
          if (errs == 0 && frame_cw_err[e.id] > 0) n_corrected++;
          $display("frame %0d: %0d channel errors, %0d information-bit errors after decoding", e.id, frame_cw_err[e.id], errs);
        end
        n_out++;
      end
    end
  end

  task automatic send(int id, int gap);
    int llr [N_VN];
    exp_t e;
    make_frame(id, llr);
    ref_decode(NIT, llr, e.app);
    n_clip += clip_events;
    e.id = id;
    for (int n = 0; n < N_VN; n++) llr_in[n] = LLR_BITS'(llr[n]);
    in_valid = 1;
    // decoder_ready is sampled half a cycle before the edge, where the DUT sees it
    forever begin
      automatic logic acc;
      @(negedge clk);
      acc = decoder_ready;
      @(posedge clk);
      if (acc) break;
    end
    q.push_back(e);
    #1 in_valid = 0;
    if (gap > 0) begin
      repeat (gap) @(posedge clk);
      #1;   // inputs change just after the edge, never on it
    end
  endtask

  initial begin
    int t0;
    build_graph();
    for (int n = 0; n < N_VN; n++) llr_in[n] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- latency of a frame entering an idle decoder ----
    @(posedge clk);
    #1 fork
      send(0, 0);
    join
    t0 = $time;
    while (!out_valid) @(posedge clk);
    checks++;
    if (($time - t0) / 10 + 1 != LAT) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", ($time - t0) / 10 + 1, LAT);
    end else $display("latency %0d cycles", LAT);
    @(posedge clk);
    #1;
    // ---- back-to-back frames; receiver stalls in the middle ----
    fork
      for (int id = 1; id < NFRAMES; id++) send(id, (id % 3 == 0) ? GAP : GAP - 1);
      begin
        repeat (LAT - 2) @(posedge clk);
        #1 receiver_ready = 0;
        repeat (8) @(posedge clk);
        #1 receiver_ready = 1;
      end
    join
    while (q.size() > 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (n_out != NFRAMES) begin failures++; $display("FAIL %0d results for %0d frames", n_out, NFRAMES); end
    $display("mechanisms: stall cycles %0d, input held %0d, cycles with several frames in flight %0d, clip events %0d, frames corrected %0d, version change %0d",
             n_stall, n_held, n_multi, n_clip, n_corrected, (NIT > 5) ? 1 : 0);
    checks += 5;
    if (n_stall == 0)     begin failures++; $display("FAIL no stall"); end
    if (n_held == 0)      begin failures++; $display("FAIL input never held off"); end
    if (n_multi == 0)     begin failures++; $display("FAIL never more than one frame in flight"); end
    if (n_clip == 0)      begin failures++; $display("FAIL clipping never happened"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no channel error was corrected"); end
    if (NIT > 5) begin
      checks++;
      if (RCQ_TABLE_SEL[4] == RCQ_TABLE_SEL[5]) begin failures++; $display("FAIL no version change"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
