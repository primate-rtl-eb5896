// te_bitonic_merger: the engine's 2n-input bitonic merger ("64-stream 2xn").
//
// Inputs a and b are each sorted in descending order (index 0 largest). a
// followed by b reversed is a bitonic sequence of 2n entries, which log2(2n)
// half-cleaner stages (6 for n = 32) sort into one descending list. The upper
// n entries (hi) are what the engine writes back as the updated segment; the
// lower n (lo) move on and are merged with the next segment, or drop out of
// the top-k list after the last one. All 2n entries move in parallel, one
// merge per clock when the result is registered by the caller, which matches
// the 64-stream width the design description gives. The merger itself is
// combinational; the Merged Buffer register is in the engine.
module te_bitonic_merger
  import primate_pkg::*;
#(
  parameter int unsigned N = 32   // segment size n; 2n inputs in all
) (
  input  te_entry_t [N-1:0] a,
  input  te_entry_t [N-1:0] b,
  output te_entry_t [N-1:0] hi,
  output te_entry_t [N-1:0] lo
);

  localparam int unsigned M    = 2 * N;
  localparam int unsigned LOGM = $clog2(M);

  always_comb begin
    te_entry_t   v [M];
    te_entry_t   t;
    int unsigned l;
    t = EMPTY_ENTRY;
    l = 0;
    for (int i = 0; i < N; i++) begin
      v[i]         = a[i];
      v[M - 1 - i] = b[i];
    end
    for (int js = LOGM - 1; js >= 0; js--) begin
      for (int i = 0; i < M; i++) begin
        l = i ^ (1 << js);
        if (l > i && key_of(v[i]) < key_of(v[l])) begin
          t    = v[i];
          v[i] = v[l];
          v[l] = t;
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      hi[i] = v[i];
      lo[i] = v[N + i];
    end
  end

endmodule
