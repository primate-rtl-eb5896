// te_seg_mem: the reserved channel memory that holds the sorted top-k buffer.
//
// The design keeps the top-k list in a 4 KB region of ordinary channel memory
// reserved for the engine, organised as segments of N scores, and reads or
// writes it one segment per access; 4 KB of one-byte scores is 128 segments of
// 32. This module stands in for that region as a synchronous memory with one
// read and one write port, each one segment wide. Alongside every score it
// keeps the token index and a valid bit (te_entry_t), which this design adds so
// that the list names the surviving tokens; they widen a row beyond the
// 256-bit score beat.
//
// Timing: rd_data is registered and shows the row addressed by rd_addr one
// clock after rd_en (this register is the engine's Segment Buffer). A write
// is done at the clock edge; reading and writing the same row in one cycle
// returns the old contents. Contents are not reset; the engine never reads a
// row it has not written since its LUT was cleared.
module te_seg_mem
  import primate_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned MAX_SEGS = 128,
  localparam int unsigned SEG_AW  = $clog2(MAX_SEGS)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [SEG_AW-1:0] rd_addr,
  output te_entry_t [N-1:0] rd_data,
  input  logic              wr_en,
  input  logic [SEG_AW-1:0] wr_addr,
  input  te_entry_t [N-1:0] wr_data
);

  te_entry_t [N-1:0] mem [MAX_SEGS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
