// te_bitonic_sorter: the engine's 4-stream n bitonic sorter and its Sorted
// Buffer.
//
// Each clock the sorter may take 4 scored tokens (the outputs of the four
// 8-to-1 accumulators). After n/4 beats (8 for n = 32) the collected n entries
// pass through a bitonic sorting network (te_sort_net) and the descending list
// is loaded into the Sorted Buffer (out_entries), so one sorted list of n is
// produced every n/4 cycles, the rate the design description gives. The input
// side streams 4 entries per cycle and the sort itself is a single parallel
// network; how the 4-stream sorter is built inside is not described, and this
// gather-then-sort structure is this design's choice.
//
// A beat marked in_last closes the current list early: unfilled slots hold
// empty entries (valid = 0), which rank below every token, and out_last
// flags the list as the end of the layer's token stream. Slots of a beat can
// also be marked empty individually with the entry's valid bit.
//
// Handshake: valid/ready on both sides. The Sorted Buffer holds its list until
// out_ready; while it is full and a new list is complete, in_ready drops
// (back-pressure to the accumulators and the channel).
module te_bitonic_sorter
  import primate_pkg::*;
#(
  parameter int unsigned N      = 32,  // list size n
  parameter int unsigned STREAM = 4    // entries accepted per cycle
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  te_entry_t [STREAM-1:0]     in_entries,
  input  logic                       in_last,
  output logic                       out_valid,
  input  logic                       out_ready,
  output te_entry_t [N-1:0]          out_entries,
  output logic                       out_last
);

  localparam int unsigned BEATS = N / STREAM;
  localparam int unsigned CNT_W = $clog2(BEATS + 1);

  te_entry_t [N-1:0] gbuf_q;
  logic [CNT_W-1:0]  cnt_q;
  logic              close_q;     // list complete (full or closed by in_last)
  logic              last_q;      // list is the last of the stream
  te_entry_t [N-1:0] sorted;

  te_sort_net #(.N(N)) u_net (.din(gbuf_q), .dout(sorted));

  logic emit, take;
  assign emit     = close_q && (!out_valid || out_ready);
  assign in_ready = !close_q || emit;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gbuf_q      <= '{default: EMPTY_ENTRY};
      cnt_q       <= '0;
      close_q     <= 1'b0;
      last_q      <= 1'b0;
      out_valid   <= 1'b0;
      out_entries <= '{default: EMPTY_ENTRY};
      out_last    <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (emit) begin
        out_entries <= sorted;
        out_last    <= last_q;
        out_valid   <= 1'b1;
      end
      if (take) begin
        // a new list starts in slot 0 after an emit
        if (emit) begin
          gbuf_q <= '{default: EMPTY_ENTRY};
          for (int s = 0; s < STREAM; s++) gbuf_q[s] <= in_entries[s];
          cnt_q <= CNT_W'(1);
          close_q <= in_last || (BEATS == 1);
        end else begin
          for (int s = 0; s < STREAM; s++) gbuf_q[cnt_q*STREAM + s] <= in_entries[s];
          cnt_q   <= cnt_q + 1'b1;
          close_q <= in_last || (cnt_q + 1'b1 == CNT_W'(BEATS));
        end
        last_q <= in_last;
      end else if (emit) begin
        gbuf_q  <= '{default: EMPTY_ENTRY};
        cnt_q   <= '0;
        close_q <= 1'b0;
        last_q  <= 1'b0;
      end
    end
  end

endmodule
