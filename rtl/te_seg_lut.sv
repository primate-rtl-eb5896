// te_seg_lut: the engine's Segment Range LUT.
//
// One entry per segment of the sorted top-k buffer holds that segment's
// largest and smallest ranking key ({valid, score}). Segments are kept in
// descending order (segment 0 holds the largest values). For a new sorted
// list whose first (largest) key is probe_key, the LUT returns the first
// segment, among the k_segs in use, whose minimum is smaller than probe_key:
// merging starts there and every earlier segment is left untouched. When no
// such segment exists (probe_found = 0) every stored value is at least as large
// as the new list, and the list is dropped.
//
// clear empties the whole LUT in one cycle (all ranges become the empty key 0,
// which also marks the segment as never written). A write (wr_en) updates one
// segment's range, as produced by te_range_detect. The lookup is combinational
// from the registered table; writes take effect on the next clock.
// last_min is the minimum of the last segment in use, used by the engine to
// stop a merge walk early; q_max is the maximum of segment q_seg (0 means the
// segment holds no token).
module te_seg_lut
  import primate_pkg::*;
#(
  parameter int unsigned MAX_SEGS = 128,
  localparam int unsigned SEG_AW  = $clog2(MAX_SEGS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [SEG_AW:0]     k_segs,     // segments in use, 1..MAX_SEGS
  input  logic                wr_en,
  input  logic [SEG_AW-1:0]   wr_seg,
  input  logic [KEY_W-1:0]    wr_max,
  input  logic [KEY_W-1:0]    wr_min,
  input  logic [KEY_W-1:0]    probe_key,
  output logic                probe_found,
  output logic [SEG_AW-1:0]   probe_seg,
  output logic [KEY_W-1:0]    last_min,
  input  logic [SEG_AW-1:0]   q_seg,
  output logic [KEY_W-1:0]    q_max
);

  logic [KEY_W-1:0] max_q [MAX_SEGS];
  logic [KEY_W-1:0] min_q [MAX_SEGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MAX_SEGS; s++) begin
        max_q[s] <= '0;
        min_q[s] <= '0;
      end
    end else if (clear) begin
      for (int s = 0; s < MAX_SEGS; s++) begin
        max_q[s] <= '0;
        min_q[s] <= '0;
      end
    end else if (wr_en) begin
      max_q[wr_seg] <= wr_max;
      min_q[wr_seg] <= wr_min;
    end
  end

  always_comb begin
    probe_found = 1'b0;
    probe_seg   = '0;
    for (int s = MAX_SEGS - 1; s >= 0; s--) begin
      if ((SEG_AW+1)'(s) < k_segs && min_q[s] < probe_key) begin
        probe_found = 1'b1;
        probe_seg   = SEG_AW'(s);
      end
    end
  end

  assign last_min = min_q[SEG_AW'(k_segs - 1'b1)];
  assign q_max    = max_q[q_seg];

endmodule
