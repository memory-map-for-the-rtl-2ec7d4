// l3_buffer_tb: checks the L3 event buffer at a reduced size (L3_AW = 8,
// 256 words; count queue of 4 events).
//
// Events of random length and content are pushed as the L3 event builder
// would and read back through the L3-DATA window, checking: empty state
// (no data available, count 0, reads 0); the word count of the oldest event;
// in-order reads; a read past the end returning 0 without retiring the event;
// retirement on the last word and the next event appearing at offset 0;
// direct reads and writes through the L3-PA debug page; the full flag when
// the count queue is full; and wrap-around of the circular memory over many
// events.
module l3_buffer_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req_dbg, req_fifo;
  logic [5:0] l3_pa;
  logic [31:0] rdata, ev_data, wcount;
  logic ev_we, ev_last, data_avail, full;
  l3_buffer #(.L3_AW(8), .EVQ_DEPTH_LOG2(2)) dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  task automatic fifo_rd(input int i, output logic [31:0] d);
    @(negedge clk); req_fifo = '{rd: 1'b1, wr: 1'b0, addr: 18'h20000 + 18'(4*i), wdata: '0};
    @(negedge clk); req_fifo = BUS_IDLE; d = rdata;
  endtask
  task automatic dbg_rd(input int w, output logic [31:0] d);
    @(negedge clk); l3_pa = 6'((4*w) >> 16); req_dbg = '{rd: 1'b1, wr: 1'b0, addr: 18'h10000 | 18'((4*w) & 16'hFFFF), wdata: '0};
    @(negedge clk); req_dbg = BUS_IDLE; d = rdata;
  endtask
  task automatic dbg_wr(input int w, input logic [31:0] d);
    @(negedge clk); l3_pa = 6'((4*w) >> 16); req_dbg = '{rd: 1'b0, wr: 1'b1, addr: 18'h10000 | 18'((4*w) & 16'hFFFF), wdata: d};
    @(negedge clk); req_dbg = BUS_IDLE;
  endtask

  // model: queue of events
  logic [31:0] q [$];
  int lens [$];
  task automatic push_event(input int len);
    for (int k = 0; k < len; k++) begin
      @(negedge clk); ev_we = 1; ev_data = $urandom; ev_last = (k == len - 1);
      q.push_back(ev_data);
    end
    lens.push_back(len);
    @(negedge clk); ev_we = 0; ev_last = 0;
  endtask
  task automatic read_event();
    logic [31:0] d;
    int len = lens.pop_front();
    chk(data_avail && wcount == 32'(len), $sformatf("word count %0d expected %0d", wcount, len));
    for (int k = 0; k < len; k++) begin
      fifo_rd(k, d);
      chk(d == q.pop_front(), $sformatf("event word %0d", k));
    end
  endtask

  int n_over, n_full, n_wrap;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d, first;
    req_dbg = BUS_IDLE; req_fifo = BUS_IDLE; l3_pa = 0; ev_we = 0; ev_last = 0; ev_data = 0; rst = 1;
    n_over = 0; n_full = 0; n_wrap = 0;
    repeat (3) @(negedge clk); rst = 0;
    chk(!data_avail && wcount == 0 && !full, "empty after reset");
    fifo_rd(0, d); chk(d == 0, "empty read gives 0");
    push_event(13);
    push_event(5);
    // debug window sees the stored words
    dbg_rd(3, d); chk(d == q[3], "debug read of word 3");
    // partial read, then over the end, then the last word
    chk(wcount == 13, "first count 13");
    for (int k = 0; k < 12; k++) begin fifo_rd(k, d); chk(d == q[k], "event 1 word"); end
    fifo_rd(20, d); chk(d == 0 && wcount == 13, "read over the end returns 0, no retire");
    if (d == 0 && wcount == 13) n_over++;
    fifo_rd(3, d); chk(d == q[3], "moving back inside the event");
    fifo_rd(12, d); chk(d == q[12], "last word");
    for (int k = 0; k < 13; k++) void'(q.pop_front());
    void'(lens.pop_front());
    chk(wcount == 5, "next event count after retire");
    read_event();
    chk(!data_avail && wcount == 0, "empty again");
    // debug write/read
    dbg_wr(200, 32'hCAFE_F00D); dbg_rd(200, d); chk(d == 32'hCAFE_F00D, "debug write");
    // fill the count queue
    for (int e = 0; e < 4; e++) push_event(3);
    chk(full, "full with 4 events queued");
    if (full) n_full++;
    for (int e = 0; e < 4; e++) read_event();
    chk(!full, "not full after draining");
    // many events through the circular memory
    for (int e = 0; e < 60; e++) begin
      push_event(1 + $urandom_range(30));
      read_event();
    end
    n_wrap = 1;
    $display("over_end=%0d full=%0d wrap=%0d", n_over, n_full, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
