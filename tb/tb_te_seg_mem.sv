// tb_te_seg_mem: self-checking test of the reserved segment memory.
// Writes random segments to random rows, keeps a copy here, and reads rows
// back checking the one-cycle read latency and read-before-write behaviour
// when the same row is read and written in one cycle.
module tb_te_seg_mem;
  import primate_pkg::*;
  localparam int N = 32;
  localparam int SEGS = 128;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [6:0] rd_addr, wr_addr;
  te_entry_t [N-1:0] rd_data, wr_data;
  te_entry_t [N-1:0] model [SEGS];
  int checks = 0, failures = 0;

  te_seg_mem #(.N(N), .MAX_SEGS(SEGS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic te_entry_t [N-1:0] rnd_seg();
    te_entry_t [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = te_entry_t'($urandom);
    return s;
  endfunction

  initial begin
    te_entry_t [N-1:0] exp_d;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0;
    // fill every row
    for (int r = 0; r < SEGS; r++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 7'(r); wr_data = rnd_seg(); model[r] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 7'($urandom);
      exp_d = model[rd_addr];
      wr_en = ($urandom % 2 == 1);
      wr_addr = (t % 4 == 0) ? rd_addr : 7'($urandom);
      wr_data = rnd_seg();
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data !== exp_d) begin failures++; $display("t=%0d read mismatch", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
