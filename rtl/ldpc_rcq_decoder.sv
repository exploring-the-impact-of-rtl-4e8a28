// ldpc_rcq_decoder: unrolled, fully parallel (648,540) LDPC decoder with
// reconstruction-computation-quantization (RCQ) messages.
//
// A frame of N_VN = 648 channel LLRs (7-bit two's complement, positive = bit 0) enters
// when in_valid and decoder_ready are both high. N_ITER = 10 min-sum iterations later, in
// unrolled hardware, the decoder presents the 648 a-posteriori LLRs and the 540 decoded
// information bits with out_valid; they stay until receiver_ready is high. A new frame can
// enter every cycle; the latency is 3*N_ITER+1 = 31 cycles when the receiver is ready.
//
// The datapath has 3*N_ITER+1 register levels. Following the published design, every level
// is driven by its own copy of the control unit instead of one unit with a huge enable
// fan-out; all copies see the same inputs and therefore hold the same state, and copy 0
// provides decoder_ready and out_valid. Reset is asynchronous and active low.
module ldpc_rcq_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned N_ITER = MAX_ITER
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          decoder_ready,
  input  logic [LLR_BITS-1:0]           llr_in [N_VN],
  output logic                          out_valid,
  input  logic                          receiver_ready,
  output logic [DWIDTH-1:0]             llr_out [N_VN],
  output logic [K_INFO-1:0]             bits_out
);
  localparam int unsigned LEVELS = 3*N_ITER + 1;

  logic [LEVELS-1:0] en, rdy, vld;

  for (genvar p = 0; p < LEVELS; p++) begin : g_cu
    control_unit #(.LATENCY(LEVELS)) u_cu (
      .clk            (clk),
      .rst_n          (rst_n),
      .in_valid       (in_valid),
      .receiver_ready (receiver_ready),
      .decoder_ready  (rdy[p]),
      .out_valid      (vld[p]),
      .enable         (en[p])
    );
  end

  assign decoder_ready = rdy[0];
  assign out_valid     = vld[0];

  ldpc_datapath #(.N_ITER(N_ITER)) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .llr_in   (llr_in),
    .llr_out  (llr_out),
    .bits_out (bits_out)
  );

  // The replicated control units must never disagree.
  a_cu_agree: assert property (@(posedge clk) disable iff (!rst_n) (en == '0) || (en == '1));
endmodule
