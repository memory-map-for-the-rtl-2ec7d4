// stc_top_full_tb: the end-to-end sequence of stc_top_body.svh with the STC
// logic at its full default sizes (8-Mbyte road memory, 4-Mbyte L3 memory,
// 8 channels).
module stc_top_full_tb;
`include "stc_top_body.svh"
  stc_top dut (.*);
endmodule
