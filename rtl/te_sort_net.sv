// te_sort_net: combinational bitonic sorting network over N engine entries.
//
// Helper of the 4-stream bitonic sorter. The network is the classic bitonic
// sorter: for every block size k = 2, 4, ..., N and every distance
// j = k/2, ..., 1, element i is compared with element i^j and the pair is put
// in order, the order alternating between neighbouring k-blocks so that the
// last pass leaves the whole array sorted. log2(N)*(log2(N)+1)/2 compare
// stages of N/2 compare-exchange units each (15 stages for N = 32).
// Entries are ranked by {valid, score}; the output is in descending order
// (index 0 holds the largest). N must be a power of two.
module te_sort_net
  import primate_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  te_entry_t [N-1:0] din,
  output te_entry_t [N-1:0] dout
);

  localparam int unsigned LOGN = $clog2(N);

  always_comb begin
    te_entry_t   v [N];
    te_entry_t   t;
    int unsigned l;
    logic        desc, swap;
    t    = EMPTY_ENTRY;
    l    = 0;
    desc = 1'b0;
    swap = 1'b0;
    for (int i = 0; i < N; i++) v[i] = din[i];
    for (int ks = 1; ks <= LOGN; ks++) begin
      for (int js = ks - 1; js >= 0; js--) begin
        for (int i = 0; i < N; i++) begin
          l = i ^ (1 << js);
          if (l > i) begin
            // descending inside blocks whose bit ks is clear
            desc = ((i >> ks) & 1) == 0;
            swap = desc ? (key_of(v[i]) < key_of(v[l])) : (key_of(v[i]) > key_of(v[l]));
            if (swap) begin
              t    = v[i];
              v[i] = v[l];
              v[l] = t;
            end
          end
        end
      end
    end
    for (int i = 0; i < N; i++) dout[i] = v[i];
  end

endmodule
