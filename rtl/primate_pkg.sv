// primate_pkg: types and constants shared by the channel-level Top-k Engine
// (TE) blocks.
//
// An importance score is 8 bits and a 256-bit HBM2E channel beat carries 32 of
// them; these two numbers follow the design description. Every entry that moves
// through the engine also carries the index of the token it belongs to and a
// valid bit, which are this design's own additions: the valid bit makes an
// empty slot rank below every real token (even one whose score is 0), and the
// index is what the host needs to know which tokens survive pruning. The index
// is 12 bits, enough for the longest evaluated sequence (4096 tokens).
package primate_pkg;

  localparam int unsigned SCORE_W   = 8;    // importance score width
  localparam int unsigned IDX_W     = 12;   // token index width (up to 4096 tokens)
  localparam int unsigned CH_BITS   = 256;  // HBM2E channel beat
  localparam int unsigned BEAT_VALS = CH_BITS / SCORE_W;  // 32 scores per beat
  localparam int unsigned NUM_ACC   = 4;    // 8-to-1 accumulators per engine
  localparam int unsigned ACC_FANIN = 8;    // banks reduced by one accumulator
  localparam int unsigned PSUM_W    = 16;   // width of a chained partial sum

  // Sort key: valid bit above the score, so empty slots sort last.
  localparam int unsigned KEY_W = SCORE_W + 1;

  typedef struct packed {
    logic               valid;
    logic [SCORE_W-1:0] score;
    logic [IDX_W-1:0]   idx;
  } te_entry_t;

  // Ranking key of an entry.
  function automatic logic [KEY_W-1:0] key_of(te_entry_t e);
    return {e.valid, e.score};
  endfunction

  localparam te_entry_t EMPTY_ENTRY = '{valid: 1'b0, score: '0, idx: '0};

endpackage
