// ldpc_datapath: the fully unrolled, fully parallel RCQ min-sum decoding datapath.
//
// Every one of the N_ITER iterations has its own hardware. Data flow of one frame:
//   input register (7-bit channel LLRs)
//   -> Q_0 layer (table version 1) -> initial layer -> CN layer of iteration 1
//   for iteration t = 1 .. N_ITER-1:
//        CN layer | C2V -> R layer (version RCQ_TABLE_SEL[t]) -> VN layer
//        | Q layer (same version) | V2C -> CN layer of iteration t+1
//   last iteration: CN layer | C2V -> R layer -> a-posteriori (OutLLR) layer
//   | conversion layer -> output register.
// The check node layers and all connection layers carry QBITS-bit quantized messages; only
// the variable node and OutLLR layers work at DWIDTH bits. The channel LLRs are kept in
// quantized form and travel down the pipeline next to the messages; an R_0 layer
// (version 1) rebuilds them in front of every VN / OutLLR layer.
//
// Pipeline ("|" above): level 0 is the input register; each iteration but the last has
// three levels (after the CN layer, after R+VN, after Q), the last one two (after the CN
// layer, after R+OutLLR), and level 3*N_ITER is the output register: 3*N_ITER+1 levels,
// so a frame takes 3*N_ITER+1 cycles and one frame can enter per cycle. en[p] enables
// level p, so each level can have its own enable driver. The level structure and cycle
// count follow the published design; exactly which layers share a stage is this design's
// reading of it. Registers reset to zero (asynchronous, active low).
//
// Buses between layers are unpacked arrays indexed [node][slot] (see ldpc_pkg); the
// channel-LLR path uses [node][0] so that the same R/Q layer modules serve it.
module ldpc_datapath
  import ldpc_pkg::*;
#(
  parameter int unsigned N_ITER = MAX_ITER
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3*N_ITER:0]   en,
  input  logic [LLR_BITS-1:0] llr_in   [N_VN],
  output logic [DWIDTH-1:0]   llr_out  [N_VN],
  output logic [K_INFO-1:0]   bits_out
);
  // ---------------- level 0: input register, then Q_0 ----------------
  logic [LLR_BITS-1:0] llr_r [N_VN][1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     for (int n = 0; n < N_VN; n++) llr_r[n][0] <= '0;
    else if (en[0]) for (int n = 0; n < N_VN; n++) llr_r[n][0] <= llr_in[n];
  end

  logic [QBITS-1:0] q0    [N_VN][1];
  logic [QBITS-1:0] q0_1d [N_VN];
  q_layer #(.ROWS(N_VN), .COLS(1), .VERSION(LLR_QUANT_VERSION), .DW_IN(LLR_BITS), .DW_OUT(QBITS))
    u_q0 (.din(llr_r), .dout(q0));
  always_comb for (int n = 0; n < N_VN; n++) q0_1d[n] = q0[n][0];

  logic [QBITS-1:0] cn_in0 [N_CN][CDEG_MAX];
  initial_layer #(.W(QBITS)) u_init (.llr_q(q0_1d), .cn_in(cn_in0));

  logic [DWIDTH-1:0] app [N_VN];   // a-posteriori LLRs, register of the last iteration

  for (genvar t = 0; t < N_ITER; t++) begin : g_it
    localparam int unsigned VER  = RCQ_TABLE_SEL[t];
    localparam int unsigned LV   = 3*t + 1;          // level of the register after the CN layer
    localparam bit          LAST = (t == N_ITER-1);

    logic [QBITS-1:0] cn_in  [N_CN][CDEG_MAX];
    logic [QBITS-1:0] cn_out [N_CN][CDEG_MAX];
    logic [QBITS-1:0] cq_r   [N_CN][CDEG_MAX];
    logic [QBITS-1:0] q0_in  [N_VN][1];
    logic [QBITS-1:0] q0_a   [N_VN][1];

    if (t == 0) begin : g_first
      assign cn_in = cn_in0;
      assign q0_in = q0;
    end else begin : g_next
      v2c_connection #(.W(QBITS)) u_v2c (.vn_out(g_it[t-1].g_mid.vq_r), .cn_in(cn_in));
      assign q0_in = g_it[t-1].g_mid.q0_c;
    end

    cn_layer #(.QW(QBITS), .OFS(OFFSET)) u_cn (.din(cn_in), .dout(cn_out));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cq_r <= '{default: '0};
        q0_a <= '{default: '0};
      end else if (en[LV]) begin
        cq_r <= cn_out;
        q0_a <= q0_in;
      end
    end

    // check-to-variable routing, reconstruction of messages and channel LLRs
    logic [QBITS-1:0]  c2v_q   [N_VN][VDEG_MAX];
    logic [DWIDTH-1:0] c2v_m   [N_VN][VDEG_MAX];
    logic [DWIDTH-1:0] llr_rec [N_VN][1];
    logic [DWIDTH-1:0] llr_1d  [N_VN];
    c2v_connection #(.W(QBITS)) u_c2v (.cn_out(cq_r), .vn_in(c2v_q));
    r_layer #(.ROWS(N_VN), .COLS(VDEG_MAX), .VERSION(VER)) u_r (.din(c2v_q), .dout(c2v_m));
    r_layer #(.ROWS(N_VN), .COLS(1), .VERSION(LLR_QUANT_VERSION)) u_r0 (.din(q0_a), .dout(llr_rec));
    always_comb for (int n = 0; n < N_VN; n++) llr_1d[n] = llr_rec[n][0];

    if (!LAST) begin : g_mid
      logic [DWIDTH-1:0] vn_out [N_VN][VDEG_MAX];
      logic [DWIDTH-1:0] vm_r   [N_VN][VDEG_MAX];
      logic [QBITS-1:0]  vn_q   [N_VN][VDEG_MAX];
      logic [QBITS-1:0]  vq_r   [N_VN][VDEG_MAX];
      logic [QBITS-1:0]  q0_b   [N_VN][1];
      logic [QBITS-1:0]  q0_c   [N_VN][1];

      vn_layer #(.DW(DWIDTH)) u_vn (.din(c2v_m), .llr(llr_1d), .dout(vn_out));

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vm_r <= '{default: '0};
          q0_b <= '{default: '0};
        end else if (en[LV+1]) begin
          vm_r <= vn_out;
          q0_b <= q0_a;
        end
      end

      q_layer #(.ROWS(N_VN), .COLS(VDEG_MAX), .VERSION(VER)) u_q (.din(vm_r), .dout(vn_q));

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vq_r <= '{default: '0};
          q0_c <= '{default: '0};
        end else if (en[LV+2]) begin
          vq_r <= vn_q;
          q0_c <= q0_b;
        end
      end
    end else begin : g_last
      logic [DWIDTH-1:0] app_c [N_VN];
      outllr_layer #(.DW(DWIDTH)) u_out (.din(c2v_m), .llr(llr_1d), .dout(app_c));

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        app <= '{default: '0};
        else if (en[LV+1]) app <= app_c;
      end
    end
  end

  // ---------------- conversion and output register ----------------
  logic [K_INFO-1:0] bits_c;
  conversion_layer #(.DW(DWIDTH)) u_conv (.llr(app), .bits(bits_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      llr_out  <= '{default: '0};
      bits_out <= '0;
    end else if (en[3*N_ITER]) begin
      llr_out  <= app;
      bits_out <= bits_c;
    end
  end
endmodule
