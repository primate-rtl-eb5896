// tb_te_topk_engine: self-checking test of one channel-level Top-k Engine.
// Several layers are streamed through the engine with different token counts,
// k (segments in use) and beats per token group (1 beat = 8 banks, 2 beats =
// 16 banks). Each token's importance score is the 8-bit saturated sum of its
// bank partial sums, computed here. After the stream the top-k list is read
// back segment by segment and checked against a histogram of the expected
// scores: the list must be in descending order, hold min(k, tokens) valid
// entries whose scores are exactly the k largest, name distinct tokens, and
// give each token its own score. Dropped lists, early-ended walks and input
// stalls are counted and each must occur.
module tb_te_topk_engine;
  import primate_pkg::*;
  localparam int SEG_N = 32;
  localparam int MAX_SEGS = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cfg_sort_en, cfg_chain_en, in_valid, in_ready, in_first, in_last, in_stream_last;
  logic [7:0] cfg_k_segs;
  logic [BEAT_VALS-1:0][SCORE_W-1:0] in_data;
  logic [NUM_ACC-1:0] in_tok_mask;
  logic [NUM_ACC-1:0][PSUM_W-1:0] chain_in, psum_out;
  logic chain_ready, busy, done, rd_en, rd_valid, ev_drop, ev_merge, ev_early;
  logic [6:0] rd_seg;
  te_entry_t [SEG_N-1:0] rd_data;
  int checks = 0, failures = 0;
  int n_drop = 0, n_merge = 0, n_early = 0, n_stall = 0;

  te_topk_engine #(.SEG_N(SEG_N), .MAX_SEGS(MAX_SEGS)) dut (.*);

  always @(posedge clk) begin
    n_drop  += int'(ev_drop);
    n_merge += int'(ev_merge);
    n_early += int'(ev_early);
    n_stall += int'(in_valid && !in_ready);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int score [4096];

  task automatic run_layer(input int ntok, input int kseg, input int beats, input int mode);
    int ngroups, sum;
    int hist [256];
    int got [256];
    int seen [4096];
    int nvalid, prev_key, k;
    ngroups = (ntok + NUM_ACC - 1) / NUM_ACC;
    k = kseg * SEG_N;
    @(negedge clk);
    cfg_k_segs = 8'(kseg); start = 1;
    @(negedge clk);
    start = 0;
    for (int g = 0; g < ngroups; g++) begin
      int acc [NUM_ACC];
      for (int a = 0; a < NUM_ACC; a++) acc[a] = 0;
      for (int b = 0; b < beats; b++) begin
        while (mode == 2 && $urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        for (int a = 0; a < NUM_ACC; a++)
          for (int i = 0; i < ACC_FANIN; i++) begin
            int v;
            case (mode)
              0: v = $urandom % 32;                        // mostly below 255
              1: v = (g * 7 + a) % 30;                     // many ties
              default: v = ($urandom % 10 == 0) ? 200 : $urandom % 16;
            endcase
            in_data[a * ACC_FANIN + i] = 8'(v);
            acc[a] += v;
          end
        in_valid = 1; in_first = (b == 0); in_last = (b == beats - 1);
        in_stream_last = (g == ngroups - 1) && (b == beats - 1);
        for (int a = 0; a < NUM_ACC; a++) in_tok_mask[a] = (g * NUM_ACC + a) < ntok;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
      for (int a = 0; a < NUM_ACC; a++) score[g * NUM_ACC + a] = (acc[a] > 255) ? 255 : acc[a];
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    // expected
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
      @(negedge clk); rd_en = 1; rd_seg = 7'(sg);
      @(negedge clk); rd_en = 0;
      checks++;
      if (!rd_valid) begin failures++; $display("no rd_valid"); end
      for (int i = 0; i < SEG_N; i++) begin
        te_entry_t e;
        e = rd_data[i];
        if (int'(key_of(e)) > prev_key) begin
          checks++; failures++; $display("order broken seg %0d slot %0d", sg, i);
        end
        prev_key = int'(key_of(e));
        if (e.valid) begin
          nvalid++;
          got[e.score]++;
          seen[e.idx]++;
          checks++;
          if (int'(e.idx) >= ntok || score[e.idx] != int'(e.score) || seen[e.idx] != 1) begin
            failures++; $display("bad entry idx=%0d score=%0d", e.idx, e.score);
          end
        end
      end
    end
    checks++;
    if (nvalid != ((ntok < k) ? ntok : k)) begin failures++; $display("ntok=%0d k=%0d valid=%0d", ntok, k, nvalid); end
    for (int s = 0; s < 256; s++) begin
      checks++;
      if (got[s] != hist[s]) begin failures++; $display("score %0d: got %0d exp %0d", s, got[s], hist[s]); end
    end
  endtask

  initial begin
    start = 0; cfg_k_segs = 8'd1; cfg_sort_en = 1; cfg_chain_en = 0; in_valid = 0; in_first = 0;
    in_last = 0; in_stream_last = 0; in_data = '0; in_tok_mask = '0; chain_in = '0; chain_ready = 1;
    rd_en = 0; rd_seg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_layer(128, 2, 1, 0);     // 128 tokens keep 64
    run_layer(786, 8, 2, 1);     // 786 tokens, 16 banks, keep 256
    run_layer(300, 16, 1, 2);    // fewer tokens than k
    run_layer(1000, 1, 1, 0);    // keep 32 of 1000: many drops
    run_layer(2048, 20, 2, 2);
    run_layer(4096, 100, 1, 0);  // long walks: the input must stall
    $display("drops=%0d merges=%0d early=%0d stalls=%0d", n_drop, n_merge, n_early, n_stall);
    checks++; if (n_drop == 0)  begin failures++; $display("no list was dropped"); end
    checks++; if (n_early == 0) begin failures++; $display("no walk ended early"); end
    checks++; if (n_stall == 0) begin failures++; $display("input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
