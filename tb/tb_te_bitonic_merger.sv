// tb_te_bitonic_merger: self-checking test of the 2n bitonic merger.
// Two random descending lists of n entries (with ties and empty slots) are
// merged; hi must be the n largest and lo the n smallest of the 2n, each in
// descending order, and together they must be a permutation of the inputs
// (checked by token index). The expected key order is computed here by
// counting keys of the inputs.
module tb_te_bitonic_merger;
  import primate_pkg::*;
  localparam int N = 32;

  te_entry_t [N-1:0] a, b, hi, lo;
  int checks = 0, failures = 0;

  te_bitonic_merger #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build a random descending list with distinct indices base..base+N-1
  task automatic make_list(output te_entry_t [N-1:0] l, input int base, input int mode);
    int cnt [512];
    int p;
    for (int k = 0; k < 512; k++) cnt[k] = 0;
    for (int i = 0; i < N; i++) begin
      int k;
      if (mode == 0)      k = 256 + ($urandom % 256);
      else if (mode == 1) k = 256 + 100 + ($urandom % 8);
      else                k = ($urandom % 3 == 0) ? 0 : 256 + ($urandom % 256);
      cnt[k]++;
    end
    p = 0;
    for (int k = 511; k >= 0; k--)
      for (int c = 0; c < cnt[k]; c++) begin
        l[p].valid = k[8]; l[p].score = k[8] ? 8'(k) : 8'd0; l[p].idx = 12'(base + p);
        p++;
      end
  endtask

  initial begin
    int cnt [512];
    int seen [64];
    int exp_key [64];
    int p;
    for (int t = 0; t < 300; t++) begin
      make_list(a, 0, t % 3);
      make_list(b, N, (t / 3) % 3);
      #1;
      for (int k = 0; k < 512; k++) cnt[k] = 0;
      for (int i = 0; i < N; i++) begin
        cnt[{a[i].valid, a[i].score}]++;
        cnt[{b[i].valid, b[i].score}]++;
      end
      p = 0;
      for (int k = 511; k >= 0; k--) for (int c = 0; c < cnt[k]; c++) begin exp_key[p] = k; p++; end
      for (int i = 0; i < 2 * N; i++) seen[i] = 0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(key_of(hi[i])) != exp_key[i] || int'(key_of(lo[i])) != exp_key[N + i]) begin
          failures++;
          $display("t=%0d i=%0d hi=%0d lo=%0d exp %0d %0d", t, i, key_of(hi[i]), key_of(lo[i]), exp_key[i], exp_key[N+i]);
        end
        seen[hi[i].idx]++;
        seen[lo[i].idx]++;
      end
      for (int i = 0; i < 2 * N; i++) begin
        checks++;
        if (seen[i] != 1) begin failures++; $display("t=%0d idx %0d seen %0d times", t, i, seen[i]); end
      end
      // every output entry keeps its own score
      for (int i = 0; i < N; i++) begin
        te_entry_t src;
        src = (hi[i].idx < N) ? a[hi[i].idx] : b[hi[i].idx - N];
        checks++;
        if (key_of(src) !== key_of(hi[i])) begin failures++; $display("t=%0d entry changed", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
