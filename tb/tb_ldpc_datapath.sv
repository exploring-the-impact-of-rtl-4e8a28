// tb_ldpc_datapath: checks the unrolled datapath on its own at reduced depth (N_ITER = 2).
//
// All pipe enables are held high, a new frame of channel LLRs enters every cycle, and each
// result that leaves the output register 3*N_ITER+1 cycles later is compared, all 648
// a-posteriori LLRs and 540 bits, with the bit-exact reference decoder of tb_ldpc_ref_pkg.
// Frames alternate between noisy codewords and random LLRs. A short burst with the enables
// low checks that every pipe level holds its contents.
module tb_ldpc_datapath;
  import ldpc_pkg::*;
  import tb_ldpc_ref_pkg::*;

  localparam int NIT     = 2;
  localparam int LAT     = 3*NIT + 1;
  localparam int NFRAMES = 8;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [3*NIT:0]      en = '0;
  logic [LLR_BITS-1:0] llr_in  [N_VN];
  logic [DWIDTH-1:0]   llr_out [N_VN];
  logic [K_INFO-1:0]   bits_out;

  ldpc_datapath #(.N_ITER(NIT)) dut (.*);

  always #5 clk = ~clk;

  int exp_app [NFRAMES][N_VN];

  initial begin
    #(64'd10 * 64'd2000);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int id);
    int bad = 0;
    for (int n = 0; n < N_VN; n++) if (int'($signed(llr_out[n])) != exp_app[id][n]) bad++;
    for (int i = 0; i < K_INFO; i++) if (bits_out[i] != (exp_app[id][i] < 0)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL frame %0d: %0d mismatching values", id, bad);
    end
  endtask

  initial begin
    int llr [NFRAMES][N_VN];
    build_graph();
    for (int id = 0; id < NFRAMES; id++) begin
      bit info [K_INFO];
      bit cw [N_VN];
      if (id % 2 == 0) begin
        for (int i = 0; i < K_INFO; i++) info[i] = 1'($urandom);
        encode(info, cw);
        for (int n = 0; n < N_VN; n++) llr[id][n] = chan_llr(cw[n], 10, 12);
      end else begin
        for (int n = 0; n < N_VN; n++) llr[id][n] = int'($urandom_range(126)) - 63;
      end
      ref_decode(NIT, llr[id], exp_app[id]);
    end
    for (int n = 0; n < N_VN; n++) llr_in[n] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    en = '1;
    // one frame per cycle; frame id leaves the output register LAT cycles after it is applied
    for (int c = 0; c < NFRAMES + LAT; c++) begin
      if (c < NFRAMES) for (int n = 0; n < N_VN; n++) llr_in[n] = LLR_BITS'(llr[c][n]);
      @(posedge clk);
      #1;
      if (c >= LAT - 1 && c - (LAT - 1) < NFRAMES) compare(c - (LAT - 1));
      // hold every pipe level for three cycles while frames are in flight
      if (c == 3) begin
        en = '0;
        for (int n = 0; n < N_VN; n++) llr_in[n] = '0;
        repeat (3) @(posedge clk);
        #1 en = '1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
