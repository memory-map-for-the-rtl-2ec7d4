// test_lut: TEST LUT shared by a pair of STC channels, with its playback.
//
// The LUT holds SMT test data for an even and an odd channel (0/1, 2/3, 4/5,
// 6/7): 2032 bytes, 508 words of 22 bits, at 0x1000 of either channel's space
// (PCI address bit 13 is ignored, so both channels see one copy). Word layout,
// from the memory map: bit 21 STOP (last word of an event), bit 20 END OF FILE
// (last word of the file, STOP also set), bits 19:16 CAV, DAV, LNKRDY, ERROR
// for both channels, bits 15:8 odd-channel data, bits 7:0 even-channel data.
// A file is stored from location 0 upward, event after event.
//
// Playback: a test-start pulse while test mode is set starts reading at
// location 0. The words are paced as the TEST register's bit 8 selects: with
// int_clk set one word goes out per clock (the internal test clock), with it
// clear one word per clock in which vtm_strobe is high (the VTM strobe). Each
// word appears on tw with tw_valid, until the word with END OF FILE or the
// last location has been sent. tw_event_end marks each word with STOP. The
// memory map gives the file format and names the two clock sources; the
// rest of the playback timing is this design's choice. A new test start
// restarts from 0. Bus reads have
// one clock of latency and return bits 21:0; the bus may read and write the
// LUT while playback runs.
module test_lut
  import stc_pkg::*;
#(
  parameter int DEPTH = 508
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  input  logic        test_mode,
  input  logic        test_start,
  input  logic        int_clk,
  input  logic        vtm_strobe,
  output logic        tw_valid,
  output test_word_t  tw,
  output logic        tw_event_end,
  output logic        busy
);
  localparam int AW = $clog2(DEPTH);
  test_word_t mem [DEPTH];

  logic [8:0] widx;
  assign widx = req.addr[10:2];

  always_ff @(posedge clk) begin
    if (req.wr && int'(widx) < DEPTH) mem[widx] <= test_word_t'(req.wdata[21:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) rdata <= (int'(widx) < DEPTH) ? {10'd0, mem[widx]} : '0;
  end

  logic [AW-1:0] ptr;
  test_word_t    cur;
  assign cur = mem[ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      ptr      <= '0;
      tw_valid <= 1'b0;
      tw       <= '0;
    end else begin
      tw_valid <= 1'b0;
      if (test_start && test_mode) begin
        busy <= 1'b1;
        ptr  <= '0;
      end else if (busy && (int_clk || vtm_strobe)) begin
        tw_valid <= 1'b1;
        tw       <= cur;
        if (cur.eof || int'(ptr) == DEPTH - 1) busy <= 1'b0;
        else                                   ptr  <= ptr + 1'b1;
      end
    end
  end
  assign tw_event_end = tw_valid && tw.stop;
endmodule
