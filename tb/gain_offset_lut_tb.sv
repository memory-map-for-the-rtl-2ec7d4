// gain_offset_lut_tb: checks the gain/offset correction table of a channel.
//
// Loads a correction for every chip (0..8) and raw value (0..255), computed
// here as (v*g_c + o_c) mod 256 with a random gain and offset per chip, packed
// four per word (byte v mod 4 at word address {chip, v/4}). Every word is read
// back, and every (chip, value) pair is looked up through the data-path port,
// whose answer comes one clock later.
module gain_offset_lut_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic [3:0] lk_chip;
  logic [7:0] lk_vtm, lk_corr;
  gain_offset_lut dut (.*);

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

  int g [9], o [9];
  function automatic logic [7:0] corr(input int c, input int v);
    return 8'((v * g[c] + o[c]) % 256);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    req = BUS_IDLE; lk_chip = 0; lk_vtm = 0; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    for (int c = 0; c < 9; c++) begin g[c] = 1 + 2 * $urandom_range(60); o[c] = $urandom_range(255); end
    for (int c = 0; c < 9; c++)
      for (int v = 0; v < 256; v += 4)
        bus_wr(13'(c * 256 + v), {corr(c, v+3), corr(c, v+2), corr(c, v+1), corr(c, v)});
    for (int c = 0; c < 9; c++)
      for (int v = 0; v < 256; v += 32) begin
        bus_rd(13'(c * 256 + v), d);
        chk(d == {corr(c, v+3), corr(c, v+2), corr(c, v+1), corr(c, v)}, $sformatf("read chip %0d v %0d", c, v));
      end
    for (int c = 0; c < 10; c++)
      for (int v = 0; v < 256; v++) begin
        @(negedge clk); lk_chip = 4'(c); lk_vtm = 8'(v);
        @(negedge clk);
        chk(lk_corr == ((c < 9) ? corr(c, v) : 8'd0), $sformatf("lookup chip %0d v %0d got %h", c, v, lk_corr));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
