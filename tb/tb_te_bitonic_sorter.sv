// tb_te_bitonic_sorter: self-checking test of the 4-stream n bitonic sorter.
// Phase 1 streams full-rate beats with out_ready held high and checks that a
// sorted list of n = 32 appears every n/4 = 8 cycles. Phase 2 adds random input
// gaps, random back-pressure and streams closed early by in_last. Every list
// must be in descending key order and hold exactly the entries sent for it
// (checked by token index and score), padded with empty entries.
module tb_te_bitonic_sorter;
  import primate_pkg::*;
  localparam int N = 32;
  localparam int S = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  te_entry_t [S-1:0] in_entries;
  te_entry_t [N-1:0] out_entries;
  int checks = 0, failures = 0;

  te_bitonic_sorter #(.N(N), .STREAM(S)) dut (.*);

  // expected lists, in send order
  te_entry_t exp_q [$][$];
  logic      exp_last_q [$];
  te_entry_t cur [$];
  int        out_cycles [$];
  int        cycle = 0;
  logic      rnd_ready = 0;
  int        lists_out = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    te_entry_t e [$];
    int cnt [4096];
    int ok;
    e = exp_q.pop_front();
    ok = 1;
    for (int i = 1; i < N; i++) if (key_of(out_entries[i]) > key_of(out_entries[i-1])) ok = 0;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (e[i]) if (e[i].valid) cnt[e[i].idx] = cnt[e[i].idx] + 1;
    for (int i = 0; i < N; i++) if (out_entries[i].valid) begin
      cnt[out_entries[i].idx] = cnt[out_entries[i].idx] - 1;
      ok = ok & (e.size() > 0);
    end
    foreach (cnt[i]) if (cnt[i] != 0) ok = 0;
    for (int i = 0; i < N; i++) if (out_entries[i].valid) begin
      int found = 0;
      foreach (e[j]) if (e[j].valid && e[j].idx == out_entries[i].idx && e[j].score == out_entries[i].score) found = 1;
      if (!found) ok = 0;
    end
    checks++;
    if (!ok) begin failures++; $display("list %0d wrong", lists_out); end
    checks++;
    if (out_last !== exp_last_q.pop_front()) begin failures++; $display("list %0d last flag", lists_out); end
    out_cycles.push_back(cycle);
    lists_out++;
  end

  assign out_ready = rnd_ready;

  int next_idx = 0;
  task automatic send_beat(input logic last, input int gaps);
    te_entry_t b [S];
    for (int s = 0; s < S; s++) begin
      b[s].valid = ($urandom % 8 != 0) || gaps == 0;
      b[s].score = 8'($urandom % ((next_idx % 3 == 0) ? 4 : 256));
      b[s].idx   = 12'(next_idx);
      next_idx++;
    end
    while (gaps > 0 && $urandom % 3 == 0) @(negedge clk);
    in_valid = 1; in_last = last;
    for (int s = 0; s < S; s++) in_entries[s] = b[s];
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    for (int s = 0; s < S; s++) cur.push_back(b[s]);
    if (last || cur.size() == N) begin
      exp_q.push_back(cur);
      exp_last_q.push_back(last);
      cur = {};
    end
    #1;
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_entries = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: full rate
    rnd_ready = 1;
    for (int i = 0; i < 10 * N / S; i++) send_beat(1'b0, 0);
    repeat (4) @(posedge clk);
    checks++;
    if (out_cycles.size() != 10) begin failures++; $display("phase1 produced %0d lists", out_cycles.size()); end
    for (int i = 1; i < out_cycles.size(); i++) begin
      checks++;
      if (out_cycles[i] - out_cycles[i-1] != N / S) begin
        failures++; $display("list interval %0d", out_cycles[i] - out_cycles[i-1]);
      end
    end
    // phase 2: gaps, back-pressure, early close
    fork
      begin
        for (int i = 0; i < 2000; i++) begin
          send_beat(($urandom % 11) == 0, 1);
        end
        send_beat(1'b1, 1);
      end
      begin
        for (int i = 0; i < 12000; i++) begin
          @(negedge clk);
          rnd_ready = ($urandom % 3 != 0);
        end
      end
    join_any
    rnd_ready = 1;
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d lists never came out", exp_q.size()); end
    $display("lists=%0d", lists_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
