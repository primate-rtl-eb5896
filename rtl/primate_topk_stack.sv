// primate_topk_stack: the Top-k Engines of one HBM2E stack.
//
// Token pruning keeps, after each Transformer layer's attention, only the k
// tokens with the largest accumulated attention ("importance") scores. Here
// that selection happens next to the memory: every channel of the stack has a
// Top-k Engine (te_topk_engine) on its 256-bit channel data path, fed by the
// partial importance sums that the banks of that channel have produced, and
// keeping its sorted top-k list in memory reserved in that channel. A stack has
// 16 channels and so 16 engines, as in the evaluated configuration.
//
// A layer whose tokens live in several channels is handled by chaining: engine
// c adds the partial sums of engine c-1 (psum chain, combinational, same beat
// in the same cycle) when cfg_chain_en[c] is set, and only the engine at the
// end of a chain (cfg_sort_en set) sorts and merges. The engines earlier in a
// chain take their ready from the next engine (chain_ready), so the beats of
// a chain must be presented to all its channels together. That a chain runs
// between neighbouring channels in index order is this design's choice; the
// description only says that several engines accumulate and one of them
// finishes the selection.
//
// The channel interfaces, the banks and their near-bank reduction logic
// outside this module deliver the beats; the per-channel ports below stand for
// the channel data path. All ports are per channel, indexed [c].
module primate_topk_stack
  import primate_pkg::*;
#(
  parameter int unsigned NUM_CH   = 16,
  parameter int unsigned SEG_N    = 32,
  parameter int unsigned MAX_SEGS = 128,
  localparam int unsigned SEG_AW  = $clog2(MAX_SEGS)
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic [NUM_CH-1:0]                              start,
  input  logic [NUM_CH-1:0][SEG_AW:0]                    cfg_k_segs,
  input  logic [NUM_CH-1:0]                              cfg_sort_en,
  input  logic [NUM_CH-1:0]                              cfg_chain_en,
  input  logic [NUM_CH-1:0]                              in_valid,
  output logic [NUM_CH-1:0]                              in_ready,
  input  logic [NUM_CH-1:0][BEAT_VALS-1:0][SCORE_W-1:0]  in_data,
  input  logic [NUM_CH-1:0]                              in_first,
  input  logic [NUM_CH-1:0]                              in_last,
  input  logic [NUM_CH-1:0][NUM_ACC-1:0]                 in_tok_mask,
  input  logic [NUM_CH-1:0]                              in_stream_last,
  output logic [NUM_CH-1:0]                              busy,
  output logic [NUM_CH-1:0]                              done,
  input  logic [NUM_CH-1:0]                              rd_en,
  input  logic [NUM_CH-1:0][SEG_AW-1:0]                  rd_seg,
  output logic [NUM_CH-1:0]                              rd_valid,
  output te_entry_t [NUM_CH-1:0][SEG_N-1:0]              rd_data,
  output logic [NUM_CH-1:0]                              ev_drop,
  output logic [NUM_CH-1:0]                              ev_merge,
  output logic [NUM_CH-1:0]                              ev_early
);

  logic [NUM_CH-1:0][NUM_ACC-1:0][PSUM_W-1:0] psum;
  logic [NUM_CH-1:0][NUM_ACC-1:0][PSUM_W-1:0] chain_in;
  logic [NUM_CH-1:0]                          chain_ready;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    if (c == 0) begin : g_first
      assign chain_in[c] = '0;
    end else begin : g_next
      assign chain_in[c] = psum[c-1];
    end
    if (c == NUM_CH - 1) begin : g_last
      assign chain_ready[c] = 1'b1;
    end else begin : g_mid
      assign chain_ready[c] = in_ready[c+1];
    end

    te_topk_engine #(.SEG_N(SEG_N), .MAX_SEGS(MAX_SEGS)) u_te (
      .clk, .rst_n,
      .start         (start[c]),
      .cfg_k_segs    (cfg_k_segs[c]),
      .cfg_sort_en   (cfg_sort_en[c]),
      .cfg_chain_en  (cfg_chain_en[c]),
      .in_valid      (in_valid[c]),
      .in_ready      (in_ready[c]),
      .in_data       (in_data[c]),
      .in_first      (in_first[c]),
      .in_last       (in_last[c]),
      .in_tok_mask   (in_tok_mask[c]),
      .in_stream_last(in_stream_last[c]),
      .chain_in      (chain_in[c]),
      .chain_ready   (chain_ready[c]),
      .psum_out      (psum[c]),
      .busy          (busy[c]),
      .done          (done[c]),
      .rd_en         (rd_en[c]),
      .rd_seg        (rd_seg[c]),
      .rd_valid      (rd_valid[c]),
      .rd_data       (rd_data[c]),
      .ev_drop       (ev_drop[c]),
      .ev_merge      (ev_merge[c]),
      .ev_early      (ev_early[c])
    );
  end

endmodule
