// tb_primate_topk_stack: end-to-end test of a stack's 16 Top-k Engines at the
// default size (16 channels, n = 32, 128 segments of reserved memory each).
//
// All channels run at once:
//   * channels 0-2 form one chain: a layer whose tokens' partial sums are
//     spread over three channels; 0 and 1 only accumulate, 2 adds the chained
//     partial sums and selects the top-k. Their beats are presented together.
//   * channels 3-15 each select the top-k of their own layer. Token counts are
//     those of the evaluated models' sequences (128, 786, 3137, 4096 tokens)
//     and smaller ones, with k set to keep about 80% of the tokens (rounded
//     up to whole segments) or much fewer, and 8 or 16 banks (1 or 2 beats)
//     per token group.
// Each token's score is computed here as the 8-bit saturated sum of all its
// bank partial sums. When a channel reports done its list is read back and
// checked against a histogram of the expected top-k scores, token by token.
// The mechanisms of the engine are counted and each must have happened:
// dropped lists, early-ended walks, input stalls, chained accumulation,
// saturated scores, two-beat token groups, a final partly filled list, and a
// layer with fewer tokens than k.
module tb_primate_topk_stack;
  import primate_pkg::*;
  localparam int NUM_CH = 16;
  localparam int SEG_N = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_CH-1:0] start, cfg_sort_en, cfg_chain_en, in_valid, in_ready, in_first, in_last;
  logic [NUM_CH-1:0] in_stream_last, busy, done, rd_en, rd_valid, ev_drop, ev_merge, ev_early;
  logic [NUM_CH-1:0][7:0] cfg_k_segs;
  logic [NUM_CH-1:0][BEAT_VALS-1:0][SCORE_W-1:0] in_data;
  logic [NUM_CH-1:0][NUM_ACC-1:0] in_tok_mask;
  logic [NUM_CH-1:0][6:0] rd_seg;
  te_entry_t [NUM_CH-1:0][SEG_N-1:0] rd_data;

  primate_topk_stack dut (.*);

  int checks = 0, failures = 0;
  int n_drop = 0, n_merge = 0, n_early = 0, n_stall = 0, n_chain = 0, n_sat = 0;
  int n_twobeat = 0, n_partial_list = 0, n_underfull = 0, n_layers = 0;

  always @(posedge clk) begin
    n_drop  += $countones(ev_drop);
    n_merge += $countones(ev_merge);
    n_early += $countones(ev_early);
    n_stall += $countones(in_valid & ~in_ready);
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one layer on channel group [c0 .. c1]; c1 sorts
  task automatic run_layer(input int c0, input int c1, input int ntok, input int kseg,
                           input int beats, input int mode);
    int score [];
    int hist [256];
    int got [256];
    int seen [];
    int ngroups, nvalid, prev_key, k;
    score = new[ntok];
    seen  = new[ntok];
    ngroups = (ntok + NUM_ACC - 1) / NUM_ACC;
    k = kseg * SEG_N;
    if (ntok % SEG_N != 0) n_partial_list++;
    if (ntok < k) n_underfull++;
    if (beats > 1) n_twobeat++;
    if (c1 > c0) n_chain++;
    @(negedge clk);
    for (int c = c0; c <= c1; c++) begin
      cfg_sort_en[c]  = (c == c1);
      cfg_chain_en[c] = (c > c0);
    end
    cfg_k_segs[c1] = 8'(kseg);
    start[c1] = 1;
    @(negedge clk);
    start[c1] = 0;
    for (int g = 0; g < ngroups; g++) begin
      int acc [NUM_ACC];
      for (int a = 0; a < NUM_ACC; a++) acc[a] = 0;
      for (int b = 0; b < beats; b++) begin
        while (mode == 2 && $urandom % 4 == 0) begin
          for (int c = c0; c <= c1; c++) in_valid[c] = 0;
          @(negedge clk);
        end
        for (int c = c0; c <= c1; c++) begin
          for (int a = 0; a < NUM_ACC; a++)
            for (int i = 0; i < ACC_FANIN; i++) begin
              int v;
              case (mode)
                0: v = $urandom % 32;
                1: v = (g * 7 + a + c) % 30;
                default: v = ($urandom % 10 == 0) ? 200 : $urandom % 16;
              endcase
              in_data[c][a * ACC_FANIN + i] = 8'(v);
              acc[a] += v;
            end
          in_valid[c] = 1; in_first[c] = (b == 0); in_last[c] = (b == beats - 1);
          in_stream_last[c] = (g == ngroups - 1) && (b == beats - 1);
          for (int a = 0; a < NUM_ACC; a++) in_tok_mask[c][a] = (g * NUM_ACC + a) < ntok;
        end
        @(posedge clk);
        while (!in_ready[c1]) @(posedge clk);
        #1;
      end
      for (int a = 0; a < NUM_ACC; a++) if (g * NUM_ACC + a < ntok) begin
        score[g * NUM_ACC + a] = (acc[a] > 255) ? 255 : acc[a];
        if (acc[a] > 255) n_sat++;
      end
    end
    for (int c = c0; c <= c1; c++) in_valid[c] = 0;
    while (!done[c1]) @(negedge clk);
    // expected top-k score histogram
    foreach (hist[i]) begin hist[i] = 0; got[i] = 0; end
    for (int t = 0; t < ntok; t++) hist[score[t]]++;
    begin
      int left = k;
      for (int s = 255; s >= 0; s--) begin
        if (hist[s] > left) hist[s] = left;
        left -= hist[s];
      end
    end
    foreach (seen[i]) seen[i] = 0;
    nvalid = 0; prev_key = 1 << 10;
    for (int sg = 0; sg < kseg; sg++) begin
      @(negedge clk); rd_en[c1] = 1; rd_seg[c1] = 7'(sg);
      @(negedge clk); rd_en[c1] = 0;
      checks++;
      if (!rd_valid[c1]) begin failures++; $display("ch%0d no rd_valid", c1); end
      for (int i = 0; i < SEG_N; i++) begin
        te_entry_t e;
        e = rd_data[c1][i];
        if (int'(key_of(e)) > prev_key) begin
          checks++; failures++; $display("ch%0d order broken seg %0d", c1, sg);
        end
        prev_key = int'(key_of(e));
        if (e.valid) begin
          nvalid++;
          got[e.score]++;
          checks++;
          if (int'(e.idx) >= ntok) begin
            failures++; $display("ch%0d idx %0d out of range", c1, e.idx);
          end else begin
            seen[e.idx]++;
            if (score[e.idx] != int'(e.score) || seen[e.idx] != 1) begin
              failures++; $display("ch%0d bad entry idx=%0d score=%0d", c1, e.idx, e.score);
            end
          end
        end
      end
    end
    checks++;
    if (nvalid != ((ntok < k) ? ntok : k)) begin
      failures++; $display("ch%0d ntok=%0d k=%0d valid=%0d", c1, ntok, k, nvalid);
    end
    for (int s = 0; s < 256; s++) begin
      checks++;
      if (got[s] != hist[s]) begin failures++; $display("ch%0d score %0d: got %0d exp %0d", c1, s, got[s], hist[s]); end
    end
    n_layers++;
  endtask

  // k for keeping 80% of the tokens, in whole segments
  function automatic int keep80(int ntok);
    return ((ntok * 8 + 9) / 10 + SEG_N - 1) / SEG_N;
  endfunction

  initial begin
    start = '0; cfg_k_segs = '0; cfg_sort_en = '1; cfg_chain_en = '0; in_valid = '0;
    in_first = '0; in_last = '0; in_stream_last = '0; in_data = '0; in_tok_mask = '0;
    rd_en = '0; rd_seg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_layer(0, 2, 786, keep80(786), 1, 0);   // chained over 3 channels
      run_layer(3, 3, 128, keep80(128), 1, 0);
      run_layer(4, 4, 786, keep80(786), 2, 1);
      run_layer(5, 5, 3137, keep80(3137), 1, 2);
      run_layer(6, 6, 4096, keep80(4096), 1, 0);
      run_layer(7, 7, 1000, 1, 1, 0);
      run_layer(8, 8, 300, 16, 1, 2);
      run_layer(9, 9, 2048, 20, 2, 2);
      run_layer(10, 10, 512, 4, 1, 1);
      run_layer(11, 11, 97, 2, 2, 0);
      run_layer(12, 12, 1500, 37, 1, 0);
      run_layer(13, 13, 64, 1, 1, 2);
      run_layer(14, 14, 640, 10, 2, 2);
      run_layer(15, 15, 256, 8, 1, 1);
    join
    $display("layers=%0d drops=%0d merges=%0d early=%0d stalls=%0d chain=%0d sat=%0d twobeat=%0d partial=%0d underfull=%0d",
             n_layers, n_drop, n_merge, n_early, n_stall, n_chain, n_sat, n_twobeat, n_partial_list, n_underfull);
    checks++; if (n_layers != 14)     begin failures++; $display("not all layers finished"); end
    checks++; if (n_drop == 0)        begin failures++; $display("no list was dropped"); end
    checks++; if (n_early == 0)       begin failures++; $display("no walk ended early"); end
    checks++; if (n_stall == 0)       begin failures++; $display("input never stalled"); end
    checks++; if (n_chain == 0)       begin failures++; $display("no chained layer"); end
    checks++; if (n_sat == 0)         begin failures++; $display("no score saturated"); end
    checks++; if (n_twobeat == 0)     begin failures++; $display("no two-beat groups"); end
    checks++; if (n_partial_list == 0) begin failures++; $display("no partial final list"); end
    checks++; if (n_underfull == 0)   begin failures++; $display("no layer below k"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
