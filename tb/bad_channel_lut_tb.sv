// bad_channel_lut_tb: checks the bad-channel table of a channel.
//
// Fills all 72 words (9 chips x 8 groups) with random 16-bit patterns, reads
// each back expecting the pattern in bits 15:0 and {chip, group} in 22:16,
// then looks up every strip of every chip and a chip id above 8, comparing
// with the pattern bit (strip s of a group = bit s mod 16); lookups answer one
// clock later.
module bad_channel_lut_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic [3:0] lk_chip;
  logic [6:0] lk_strip;
  logic lk_bad;
  bad_channel_lut dut (.*);

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

  logic [15:0] pat [72];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    req = BUS_IDLE; lk_chip = 0; lk_strip = 0; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    for (int w = 0; w < 72; w++) begin
      pat[w] = 16'($urandom);
      bus_wr(13'h1800 + 13'(4*w), {16'hFFFF, pat[w]});
    end
    for (int w = 0; w < 72; w++) begin
      bus_rd(13'h1800 + 13'(4*w), d);
      chk(d == {9'd0, 4'(w / 8), 3'(w % 8), pat[w]}, $sformatf("word %0d read %h", w, d));
    end
    for (int c = 0; c < 10; c++) begin
      for (int s = 0; s < 128; s++) begin
        @(negedge clk); lk_chip = 4'(c); lk_strip = 7'(s);
        @(negedge clk);
        chk(lk_bad == ((c < 9) ? pat[c*8 + s/16][s%16] : 1'b0), $sformatf("lookup chip %0d strip %0d", c, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
