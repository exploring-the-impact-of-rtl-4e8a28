// control_unit: ready/valid control of the decoder pipeline.
//
// The datapath is a fixed pipeline of LATENCY register levels that accepts a new frame every
// cycle. This unit keeps one valid bit per level in a shift register that moves together
// with the data: a frame enters when in_valid is high while the pipeline advances, and
// out_valid is the valid bit of the last level. The pipeline advances (enable = 1) when no
// result is waiting (out_valid = 0) or the receiver takes it (receiver_ready = 1);
// otherwise every level holds. decoder_ready equals enable, so a producer may only present
// a frame that the input register can take in the same cycle.
// Timing: a frame sampled with in_valid in cycle c is presented with out_valid from cycle
// c + LATENCY on, and stays until receiver_ready is seen high.
// Reset (rst_n low, asynchronous) empties the pipeline.
module control_unit #(
  parameter int unsigned LATENCY = 31
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic receiver_ready,
  output logic decoder_ready,
  output logic out_valid,
  output logic enable
);
  logic [LATENCY-1:0] valid_sr;

  assign out_valid     = valid_sr[LATENCY-1];
  assign enable        = !out_valid || receiver_ready;
  assign decoder_ready = enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid_sr <= '0;
    else if (enable) valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end

  // A result must stay on the outputs until the receiver takes it.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !receiver_ready) |=> out_valid;
  endproperty
  a_hold: assert property (p_hold);
endmodule
