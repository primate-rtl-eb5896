// te_accum8: one 8-to-1 accumulator of the Top-k Engine.
//
// Each bank holds a partial importance sum for every token; this unit adds the
// partial sums of one token from 8 banks (one byte lane group of a 256-bit
// channel beat) and keeps adding over further beats until the beat marked
// in_last, so that a channel with more than 8 banks (16 in HBM2E) needs two
// beats per token group. The four accumulators of an engine therefore turn one
// beat into 4 token scores, as the design description states. Accumulating over
// several beats with in_first/in_last markers is this design's own choice.
//
// When a layer's tokens are spread over several channels, each channel's
// engine accumulates its own banks and the partial sums are chained: psum_out
// is this unit's running sum plus, when chain_en is set, the neighbouring
// engine's psum_out (chain_in). The chain is combinational so every engine of a
// chain sees the same beat in the same cycle. score_out saturates psum_out to
// the 8-bit score width (the description keeps 8-bit scores; saturation is this
// design's choice of how to get back to 8 bits).
//
// Timing: the sum of a beat is registered; out_valid is high for one cycle,
// the cycle after the beat carrying in_last, and psum_out/score_out are valid
// with it. Reset (rst_n) is asynchronous and active low.
module te_accum8
  import primate_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         in_first,   // start a new token group
  input  logic                         in_last,    // final beat of the group
  input  logic [ACC_FANIN-1:0][SCORE_W-1:0] in_vals,
  input  logic                         chain_en,
  input  logic [PSUM_W-1:0]            chain_in,
  output logic                         out_valid,
  output logic [PSUM_W-1:0]            psum_out,
  output logic [SCORE_W-1:0]           score_out
);

  logic [PSUM_W-1:0] acc_q;
  logic [PSUM_W-1:0] beat_sum;

  always_comb begin
    beat_sum = '0;
    for (int i = 0; i < ACC_FANIN; i++) beat_sum += PSUM_W'(in_vals[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) acc_q <= (in_first ? '0 : acc_q) + beat_sum;
    end
  end

  assign psum_out  = acc_q + (chain_en ? chain_in : '0);
  assign score_out = (psum_out > PSUM_W'({SCORE_W{1'b1}})) ? {SCORE_W{1'b1}}
                                                           : psum_out[SCORE_W-1:0];

endmodule
