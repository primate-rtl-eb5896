// tb_te_seg_lut: self-checking test of the Segment Range LUT.
// Random range writes keep a model here; probes with random keys and random
// numbers of segments in use are checked against a linear search of the
// model for the first segment whose minimum is below the probe. clear must
// empty every entry in one cycle.
module tb_te_seg_lut;
  import primate_pkg::*;
  localparam int SEGS = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, wr_en, probe_found;
  logic [7:0] k_segs;
  logic [6:0] wr_seg, probe_seg, q_seg;
  logic [KEY_W-1:0] wr_max, wr_min, probe_key, last_min, q_max;
  int mmax [SEGS], mmin [SEGS];
  int checks = 0, failures = 0;

  te_seg_lut #(.MAX_SEGS(SEGS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_probe();
    int ef, es;
    ef = 0; es = 0;
    for (int s = 0; s < int'(k_segs); s++) if (mmin[s] < int'(probe_key)) begin ef = 1; es = s; break; end
    checks++;
    if (probe_found !== 1'(ef) || (ef == 1 && int'(probe_seg) != es)) begin
      failures++; $display("probe key=%0d k=%0d got %b/%0d exp %0d/%0d", probe_key, k_segs, probe_found, probe_seg, ef, es);
    end
    checks++;
    if (int'(last_min) != mmin[k_segs - 1] || int'(q_max) != mmax[q_seg]) begin
      failures++; $display("last_min/q_max mismatch");
    end
  endtask

  initial begin
    clear = 0; wr_en = 0; k_segs = 8'd128; wr_seg = 0; wr_max = 0; wr_min = 0; probe_key = 0; q_seg = 0;
    for (int s = 0; s < SEGS; s++) begin mmax[s] = 0; mmin[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      for (int t = 0; t < 800; t++) begin
        @(negedge clk);
        wr_en = ($urandom % 2 == 1);
        wr_seg = 7'($urandom);
        wr_min = KEY_W'($urandom % 512);
        wr_max = KEY_W'(int'(wr_min) + ($urandom % 40)) ;
        if (wr_max < wr_min) wr_max = 9'h1ff;
        @(negedge clk);
        if (wr_en) begin mmax[wr_seg] = wr_max; mmin[wr_seg] = wr_min; end
        wr_en = 0;
        k_segs = 8'(1 + ($urandom % SEGS));
        probe_key = KEY_W'($urandom % 512);
        q_seg = 7'($urandom);
        #1;
        check_probe();
      end
      // clear
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int s = 0; s < SEGS; s++) begin mmax[s] = 0; mmin[s] = 0; end
      probe_key = 9'h100; k_segs = 8'd5; q_seg = 7'd3;
      #1;
      check_probe();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
