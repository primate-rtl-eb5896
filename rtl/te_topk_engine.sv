// te_topk_engine: channel-level Top-k Engine (TE).
//
// Finds the k most important tokens of a layer from the partial attention
// importance sums stored in a channel's banks. Data path, in stream order:
//   1. Four 8-to-1 accumulators (te_accum8) reduce each 256-bit channel beat
//      (32 one-byte partial sums) to 4 token scores; a token group may span
//      several beats (in_first .. in_last), and partial sums of another
//      channel's engine may be chained in (chain_in / psum_out).
//   2. The 4-stream bitonic sorter turns every n scores (n/4 groups) into one
//      descending list, held in its Sorted Buffer.
//   3. The Segment Range LUT is probed with the list's first (largest) key. If
//      every stored segment is at least that large, the list is dropped.
//      Otherwise the walk starts at the first segment whose minimum is smaller:
//      each cycle one segment is read from the reserved memory (te_seg_mem, its
//      read register being the Segment Buffer), merged with the carried list in
//      the 2n bitonic merger, the upper n go to the Merged Buffer and are
//      written back one cycle later while New Range Detection updates that
//      segment's LUT entry, and the lower n are carried to the next segment.
//      After the last segment in use the carry is discarded, which is how the
//      list keeps only k = cfg_k_segs * n entries. The walk also stops as soon
//      as the carry's largest key is not above the last segment's minimum
//      (nothing left that could enter the list).
// Segments are in descending order: segment 0 holds the largest scores.
//
// The structure above follows the design description. This design's own
// choices: entries carry a token index and a valid bit; the token index is the
// position of the token in the engine's input stream (4 per accumulated
// group, lane a of the beat giving token 4*g+a); one segment is merged per
// clock with a one-cycle write-back pipeline (the description asks for the
// merger to keep up with the channel, not for a specific schedule); saturation
// of the accumulated score to 8 bits.
//
// Interface:
//   start        pulse; clears the LUT and token counter, latches cfg_k_segs
//                (1..MAX_SEGS) and makes the engine accept beats.
//   cfg_sort_en  this engine sorts; when 0 it only accumulates and offers its
//                partial sums on psum_out, and its in_ready follows chain_ready.
//   cfg_chain_en add chain_in (the neighbouring engine's psum_out) to the sums.
//   in_*         valid/ready beat stream; in_tok_mask marks which of the 4
//                token groups of the beat are real tokens; in_stream_last on a
//                group's last beat ends the layer's stream.
//   done         high after the last list has been inserted, until next start.
//   rd_*         read-out of the finished list, one segment per request, data
//                one clock after rd_en (only while not busy).
//   ev_*         one-cycle event pulses (list dropped, segment merged, early
//                end of a walk) for monitoring.
module te_topk_engine
  import primate_pkg::*;
#(
  parameter int unsigned SEG_N    = 32,
  parameter int unsigned MAX_SEGS = 128,
  localparam int unsigned SEG_AW  = $clog2(MAX_SEGS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [SEG_AW:0]                   cfg_k_segs,
  input  logic                              cfg_sort_en,
  input  logic                              cfg_chain_en,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [BEAT_VALS-1:0][SCORE_W-1:0] in_data,
  input  logic                              in_first,
  input  logic                              in_last,
  input  logic [NUM_ACC-1:0]                in_tok_mask,
  input  logic                              in_stream_last,
  input  logic [NUM_ACC-1:0][PSUM_W-1:0]    chain_in,
  input  logic                              chain_ready,
  output logic [NUM_ACC-1:0][PSUM_W-1:0]    psum_out,
  output logic                              busy,
  output logic                              done,
  input  logic                              rd_en,
  input  logic [SEG_AW-1:0]                 rd_seg,
  output logic                              rd_valid,
  output te_entry_t [SEG_N-1:0]             rd_data,
  output logic                              ev_drop,
  output logic                              ev_merge,
  output logic                              ev_early
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_WALK, S_WBLAST, S_DONE} state_t;
  state_t state_q;

  logic [SEG_AW:0] k_segs_q;

  // ---------------- accumulators ----------------
  logic [NUM_ACC-1:0]               acc_valid;
  logic [NUM_ACC-1:0][SCORE_W-1:0]  acc_score;
  logic                             beat_take;

  for (genvar a = 0; a < NUM_ACC; a++) begin : g_acc
    te_accum8 u_acc (
      .clk, .rst_n,
      .in_valid (beat_take),
      .in_first (in_first),
      .in_last  (in_last),
      .in_vals  (in_data[a*ACC_FANIN +: ACC_FANIN]),
      .chain_en (cfg_chain_en),
      .chain_in (chain_in[a]),
      .out_valid(acc_valid[a]),
      .psum_out (psum_out[a]),
      .score_out(acc_score[a])
    );
  end

  // Group finished by the accumulators waits here until the sorter takes it.
  logic               pend_q;
  logic [NUM_ACC-1:0] pend_mask_q;
  logic               pend_last_q;
  logic               pend;
  logic               srt_in_ready, srt_take;
  logic [IDX_W-1:0]   tok_q;

  assign pend     = pend_q || (|acc_valid);
  assign srt_take = pend && cfg_sort_en && srt_in_ready;

  logic accepting;
  assign accepting = (state_q != S_IDLE) && (state_q != S_DONE);
  assign in_ready  = cfg_sort_en ? (accepting && (!pend || srt_take)) : chain_ready;
  assign beat_take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q      <= 1'b0;
      pend_mask_q <= '0;
      pend_last_q <= 1'b0;
      tok_q       <= '0;
    end else begin
      if (beat_take && in_last) begin
        pend_mask_q <= in_tok_mask;
        pend_last_q <= in_stream_last;
      end
      pend_q <= pend && !srt_take && cfg_sort_en;
      if (start) tok_q <= '0;
      else if (srt_take) tok_q <= tok_q + IDX_W'(NUM_ACC);
    end
  end

  te_entry_t [NUM_ACC-1:0] srt_in;
  always_comb begin
    for (int a = 0; a < NUM_ACC; a++) begin
      srt_in[a].valid = pend_mask_q[a];
      srt_in[a].score = acc_score[a];
      srt_in[a].idx   = tok_q + IDX_W'(a);
    end
  end

  // ---------------- sorter / Sorted Buffer ----------------
  logic                  srt_out_valid, srt_out_ready, srt_out_last;
  te_entry_t [SEG_N-1:0] srt_out;

  te_bitonic_sorter #(.N(SEG_N), .STREAM(NUM_ACC)) u_sorter (
    .clk, .rst_n,
    .in_valid   (pend && cfg_sort_en),
    .in_ready   (srt_in_ready),
    .in_entries (srt_in),
    .in_last    (pend_last_q),
    .out_valid  (srt_out_valid),
    .out_ready  (srt_out_ready),
    .out_entries(srt_out),
    .out_last   (srt_out_last)
  );

  // ---------------- LUT, memory, merger ----------------
  logic              probe_found;
  logic [SEG_AW-1:0] probe_seg;
  logic [KEY_W-1:0]  last_min, q_max;
  logic              lut_wr;
  logic [KEY_W-1:0]  wr_max, wr_min;

  logic              mem_rd;
  logic [SEG_AW-1:0] mem_raddr;
  te_entry_t [SEG_N-1:0] mem_rdata;

  te_entry_t [SEG_N-1:0] carry_q, merged_q, seg_buf, m_hi, m_lo;
  logic [SEG_AW-1:0] seg_q, wb_seg_q;
  logic              wb_q;
  logic              rd_empty_q;
  logic              blk_last_q;

  te_seg_lut #(.MAX_SEGS(MAX_SEGS)) u_lut (
    .clk, .rst_n,
    .clear      (start),
    .k_segs     (k_segs_q),
    .wr_en      (lut_wr),
    .wr_seg     (wb_seg_q),
    .wr_max     (wr_max),
    .wr_min     (wr_min),
    .probe_key  (key_of(srt_out[0])),
    .probe_found(probe_found),
    .probe_seg  (probe_seg),
    .last_min   (last_min),
    .q_seg      (mem_raddr),
    .q_max      (q_max)
  );

  te_seg_mem #(.N(SEG_N), .MAX_SEGS(MAX_SEGS)) u_mem (
    .clk,
    .rd_en  (mem_rd),
    .rd_addr(mem_raddr),
    .rd_data(mem_rdata),
    .wr_en  (wb_q),
    .wr_addr(wb_seg_q),
    .wr_data(merged_q)
  );

  te_range_detect #(.N(SEG_N)) u_range (
    .seg    (merged_q),
    .max_key(wr_max),
    .min_key(wr_min)
  );
  assign lut_wr = wb_q;

  // A segment never written since start reads as empty.
  assign seg_buf = rd_empty_q ? '{default: EMPTY_ENTRY} : mem_rdata;

  te_bitonic_merger #(.N(SEG_N)) u_merger (
    .a (carry_q),
    .b (seg_buf),
    .hi(m_hi),
    .lo(m_lo)
  );

  // ---------------- control ----------------
  logic walk_more;
  assign walk_more = ((SEG_AW+1)'(seg_q) + 1'b1 < k_segs_q) && (key_of(m_lo[0]) > last_min);

  always_comb begin
    srt_out_ready = 1'b0;
    mem_rd        = 1'b0;
    mem_raddr     = seg_q + 1'b1;
    unique case (state_q)
      S_RUN: begin
        srt_out_ready = srt_out_valid;
        mem_rd        = srt_out_valid && probe_found;
        mem_raddr     = probe_seg;
      end
      S_WALK: begin
        mem_rd    = walk_more;
        mem_raddr = seg_q + 1'b1;
      end
      S_IDLE, S_DONE: begin
        mem_rd    = rd_en;
        mem_raddr = rd_seg;
      end
      default: ;
    endcase
  end

  assign ev_drop  = (state_q == S_RUN) && srt_out_valid && !probe_found;
  assign ev_merge = (state_q == S_WALK);
  assign ev_early = (state_q == S_WALK) && !walk_more &&
                    ((SEG_AW+1)'(seg_q) + 1'b1 < k_segs_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      k_segs_q   <= (SEG_AW+1)'(MAX_SEGS);
      carry_q    <= '{default: EMPTY_ENTRY};
      merged_q   <= '{default: EMPTY_ENTRY};
      seg_q      <= '0;
      wb_seg_q   <= '0;
      wb_q       <= 1'b0;
      rd_empty_q <= 1'b1;
      blk_last_q <= 1'b0;
      rd_valid   <= 1'b0;
    end else begin
      wb_q     <= 1'b0;
      rd_valid <= 1'b0;
      if (mem_rd) rd_empty_q <= (q_max == '0);
      if (start) begin
        state_q  <= S_RUN;
        k_segs_q <= cfg_k_segs;
      end else begin
        unique case (state_q)
          S_IDLE: rd_valid <= rd_en;
          S_DONE: rd_valid <= rd_en;
          S_RUN: begin
            if (srt_out_valid) begin
              if (probe_found) begin
                carry_q    <= srt_out;
                seg_q      <= probe_seg;
                blk_last_q <= srt_out_last;
                state_q    <= S_WALK;
              end else if (srt_out_last) begin
                state_q <= S_DONE;
              end
            end
          end
          S_WALK: begin
            merged_q <= m_hi;
            carry_q  <= m_lo;
            wb_q     <= 1'b1;
            wb_seg_q <= seg_q;
            if (walk_more) seg_q <= seg_q + 1'b1;
            else           state_q <= S_WBLAST;
          end
          S_WBLAST: state_q <= blk_last_q ? S_DONE : S_RUN;
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

  assign busy    = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done    = (state_q == S_DONE);
  assign rd_data = seg_buf;

  // The beat stream must hold its data while it waits for in_ready.
  a_cfg_k: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (cfg_k_segs != '0 && cfg_k_segs <= (SEG_AW+1)'(MAX_SEGS)));

endmodule
