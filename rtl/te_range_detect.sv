// te_range_detect: the engine's New Range Detection unit.
//
// Before a merged segment is written back, this unit scans all its N entries
// and reports the largest and smallest ranking key ({valid, score}) for the
// Segment Range LUT. A full scan (rather than taking the first and last slot of
// the already sorted segment) is what the description calls scanning; it gives
// the right range whatever order the entries are in. Purely combinational.
module te_range_detect
  import primate_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  te_entry_t [N-1:0] seg,
  output logic [KEY_W-1:0]  max_key,
  output logic [KEY_W-1:0]  min_key
);

  always_comb begin
    max_key = key_of(seg[0]);
    min_key = key_of(seg[0]);
    for (int i = 1; i < N; i++) begin
      if (key_of(seg[i]) > max_key) max_key = key_of(seg[i]);
      if (key_of(seg[i]) < min_key) min_key = key_of(seg[i]);
    end
  end

endmodule
