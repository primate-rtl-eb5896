// tb_workload_layers: the four evaluated models' token counts through all 12
// layers of progressive pruning, on four channels of a default-size stack.
//
// W1 (ViT, 786 tokens), W2 (ViT, 3137), W3 (BERT, 128) and W4 (RoBERTa, 4096)
// each run 12 layers on their own channel. Every layer keeps 80% of its
// tokens (rounded up), which is the next layer's token count; the engine's k
// is that count rounded up to whole segments of 32, and the first k entries of
// the list are the kept tokens. Uniform 80% per layer also gives W1's overall
// 39% of tokens remaining summed over the layers (its real schedule is not
// uniform). Every bank of a channel (16, two beats per token group) delivers a
// partial sum. Each layer's list is checked as in tb_primate_topk_stack:
// order, count, the exact top-k score histogram and each token's own score.
module tb_workload_layers;
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

  // 12 layers, each keeping 80% of the previous layer's tokens
  task automatic run_model(input int ch, input int ntok0, input int beats, input int mode);
    int n, nnext;
    n = ntok0;
    for (int l = 0; l < 12; l++) begin
      nnext = (n * 8 + 9) / 10;
      run_layer(ch, ch, n, (nnext + SEG_N - 1) / SEG_N, beats, mode);
      tokens_total[ch] += n;
      n = nnext;
    end
  endtask

  int tokens_total [NUM_CH];

  initial begin
    start = '0; cfg_k_segs = '0; cfg_sort_en = '1; cfg_chain_en = '0; in_valid = '0;
    in_first = '0; in_last = '0; in_stream_last = '0; in_data = '0; in_tok_mask = '0;
    rd_en = '0; rd_seg = '0;
    foreach (tokens_total[i]) tokens_total[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_model(0, 786, 2, 0);    // W1 ViT, Stanford Dogs
      run_model(1, 3137, 2, 2);   // W2 ViT, CUB-200-2011
      run_model(2, 128, 2, 1);    // W3 BERT, SST-2
      run_model(3, 4096, 2, 0);   // W4 RoBERTa, Hyperpartisan News
    join
    $display("layers=%0d tokens W1=%0d W2=%0d W3=%0d W4=%0d drops=%0d early=%0d stalls=%0d",
             n_layers, tokens_total[0], tokens_total[1], tokens_total[2], tokens_total[3],
             n_drop, n_early, n_stall);
    checks++; if (n_layers != 48) begin failures++; $display("not all layers finished"); end
    checks++; if (n_drop == 0)    begin failures++; $display("no list was dropped"); end
    checks++; if (n_early == 0)   begin failures++; $display("no walk ended early"); end
    checks++; if (n_stall == 0)   begin failures++; $display("input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
