// stc_top_tb: end-to-end test of the STC logic at reduced memory sizes
// (road memory 2^12 words, L3 memory 2^10 words). The sequence, shared with
// stc_top_full_tb, is described in stc_top_body.svh.
module stc_top_tb;
  localparam int RAW = 12;
  localparam int LAW = 10;
`include "stc_top_body.svh"
  stc_top #(.ROAD_AW(RAW), .L3_AW(LAW)) dut (.*);
endmodule
