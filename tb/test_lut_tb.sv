// test_lut_tb: checks the Test LUT and its playback with the example SMT test
// data file (two events, 22 words).
//
// The file is written from location 0 and read back (bits 21:0). A test start
// without test mode must play nothing. With test mode set, a test start must
// produce the 22 words in order on 22 consecutive clocks starting one clock
// after the start (internal test clock), with an event end on words 10 and 22
// and the playback stopping after the END OF FILE word. A second playback
// paced by the VTM strobe (internal clock off) must hold while the strobe is
// low and send exactly one word per strobe clock, one clock after it.
module test_lut_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic test_mode, test_start, int_clk, vtm_strobe, tw_valid, tw_event_end, busy;
  test_word_t tw;
  test_lut dut (.*);

  localparam logic [21:0] FILE_WORDS [22] = '{
    22'h080505, 22'h080002, 22'h0882c0, 22'h0800c0, 22'h080ac0, 22'h0803c0, 22'h080bc0,
    22'h0818c0, 22'h08c0c0, 22'h28c0c0,
    22'h080505, 22'h080002, 22'h088280, 22'h080000, 22'h085152, 22'h08020e, 22'h085553,
    22'h080c0a, 22'h0856c0, 22'h0805c0, 22'h08c0c0, 22'h38c0c0};

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [12:0] a, input logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: 18'(a), wdata: d};
    @(negedge clk); req = BUS_IDLE;
  endtask
  task automatic bus_rd(input logic [12:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: 18'(a), wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask

  int nvalid, nend, first_cyc, last_cyc, cyc, idx;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (!rst && tw_valid) begin
    chk(idx < 22 && tw == test_word_t'(FILE_WORDS[idx]), $sformatf("played word %0d = %h", idx, tw));
    if (nvalid == 0) first_cyc = cyc;
    last_cyc = cyc;
    nvalid++;
    if (tw_event_end) nend++;
    idx++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    int start_cyc;
    cyc = 0; nvalid = 0; nend = 0; idx = 0;
    req = BUS_IDLE; test_mode = 0; test_start = 0; int_clk = 1; vtm_strobe = 0; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    for (int k = 0; k < 22; k++) bus_wr(13'h1000 + 13'(4*k), {10'h3FF, FILE_WORDS[k]});
    for (int k = 0; k < 22; k++) begin
      bus_rd(13'h1000 + 13'(4*k), d);
      chk(d == {10'd0, FILE_WORDS[k]}, $sformatf("read back %0d = %h", k, d));
    end
    @(negedge clk); test_start = 1;
    @(negedge clk); test_start = 0;
    repeat (40) @(negedge clk);
    chk(nvalid == 0 && !busy, "no playback without test mode");
    test_mode = 1;
    @(negedge clk); test_start = 1; start_cyc = cyc;
    @(negedge clk); test_start = 0;
    repeat (40) @(negedge clk);
    chk(nvalid == 22, $sformatf("22 words played, got %0d", nvalid));
    chk(nend == 2, $sformatf("2 event ends, got %0d", nend));
    chk(first_cyc == start_cyc + 2 && last_cyc == first_cyc + 21,
        $sformatf("timing start %0d first %0d last %0d", start_cyc, first_cyc, last_cyc));
    chk(!busy, "playback stopped at end of file");
    // strobe-paced playback
    int_clk = 0; nvalid = 0; nend = 0; idx = 0;
    @(negedge clk); test_start = 1;
    @(negedge clk); test_start = 0;
    repeat (20) @(negedge clk);
    chk(nvalid == 0 && busy, "playback holds without VTM strobe");
    for (int k = 0; k < 22; k++) begin
      vtm_strobe = 1; start_cyc = cyc;
      @(negedge clk); vtm_strobe = 0;
      #1;
      chk(nvalid == k + 1 && last_cyc == start_cyc + 1,
          $sformatf("strobe %0d: words %0d, strobe at %0d, word at %0d", k, nvalid, start_cyc, last_cyc));
      repeat (k % 3) @(negedge clk);
    end
    chk(nvalid == 22 && nend == 2 && !busy, $sformatf("strobe-paced file: %0d words, %0d ends", nvalid, nend));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
