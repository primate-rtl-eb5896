// tb_te_accum8: self-checking test of one 8-to-1 accumulator.
// Random 8-byte beats are grouped 1..3 beats per token; the expected partial
// sum and 8-bit saturated score are computed here from the same beats, with and
// without a chained partial sum. out_valid must come exactly one cycle after
// the group's last beat.
module tb_te_accum8;
  import primate_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, chain_en, out_valid;
  logic [ACC_FANIN-1:0][SCORE_W-1:0] in_vals;
  logic [PSUM_W-1:0] chain_in, psum_out;
  logic [SCORE_W-1:0] score_out;
  int checks = 0, failures = 0;

  te_accum8 dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_sum, nb;
    logic [PSUM_W-1:0] exp_p;
    in_valid = 0; in_first = 0; in_last = 0; chain_en = 0; chain_in = '0; in_vals = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int g = 0; g < 400; g++) begin
      nb = 1 + ($urandom % 3);
      exp_sum = 0;
      for (int b = 0; b < nb; b++) begin
        in_valid = 1; in_first = (b == 0); in_last = (b == nb - 1);
        for (int i = 0; i < ACC_FANIN; i++) begin
          // small values most of the time so both saturated and unsaturated cases occur
          in_vals[i] = (g % 4 == 0) ? 8'($urandom) : 8'($urandom % 24);
          exp_sum += in_vals[i];
        end
        @(negedge clk);
        if (out_valid) begin checks++; failures++; $display("early out_valid g=%0d", g); end
        @(posedge clk); #1;
      end
      in_valid = 0; in_first = 0; in_last = 0;
      chain_en = (g % 3 == 1);
      chain_in = PSUM_W'($urandom % 300);
      #1;
      exp_p = PSUM_W'(exp_sum) + (chain_en ? chain_in : '0);
      checks++;
      if (!out_valid || psum_out !== exp_p) begin
        failures++; $display("g=%0d valid=%b psum=%0d exp=%0d", g, out_valid, psum_out, exp_p);
      end
      checks++;
      if (score_out !== ((exp_p > 255) ? 8'd255 : exp_p[7:0])) begin
        failures++; $display("g=%0d score=%0d exp_p=%0d", g, score_out, exp_p);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid held g=%0d", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
