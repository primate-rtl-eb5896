// tb_te_range_detect: self-checking test of New Range Detection.
// Random segments, sorted and unsorted, with empty slots; max and min keys are
// computed here independently.
module tb_te_range_detect;
  import primate_pkg::*;
  localparam int N = 32;

  te_entry_t [N-1:0] seg;
  logic [KEY_W-1:0] max_key, min_key;
  int checks = 0, failures = 0;

  te_range_detect #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, mn, k;
    for (int t = 0; t < 2000; t++) begin
      mx = -1; mn = 1000;
      for (int i = 0; i < N; i++) begin
        seg[i].valid = (t % 5 == 0) ? ($urandom % 2 == 1) : 1'b1;
        seg[i].score = (t % 7 == 0) ? 8'(t) : 8'($urandom);
        seg[i].idx   = 12'($urandom);
        k = {seg[i].valid, seg[i].score};
        if (k > mx) mx = k;
        if (k < mn) mn = k;
      end
      #1;
      checks++;
      if (int'(max_key) != mx || int'(min_key) != mn) begin
        failures++; $display("t=%0d got %0d/%0d exp %0d/%0d", t, max_key, min_key, mx, mn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
