// chan_monitor_tb: checks the sixteen monitor counters of a channel.
//
// Random strobes drive the counters while the testbench keeps its own counts.
// After MONITOR-START every readout register (0x1B00 + 4k) must hold the
// count up to and including the start clock, mon_done must be high, and the
// readout must stay frozen while counting goes on; a second start must show
// only what was counted after the first. Reads have one clock of latency.
module chan_monitor_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [15:0] ev;
  logic mon_start, mon_done;
  bus_req_t req;
  logic [31:0] rdata;
  always #5 clk = ~clk;

  chan_monitor dut (.clk, .rst, .events(ev), .mon_start, .mon_done, .req, .rdata);

  int unsigned model [16];

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_rd(input logic [12:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: 18'(a), wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ev = 16'($urandom);
      for (int k = 0; k < 16; k++) model[k] += ev[k];
    end
    @(negedge clk); ev = '0;
  endtask

  task automatic latch_and_check(input string tag);
    logic [31:0] d;
    @(negedge clk); mon_start = 1'b1; ev = 16'hA5C3;
    for (int k = 0; k < 16; k++) model[k] += ev[k];
    @(negedge clk); mon_start = 1'b0; ev = 16'hFFFF;      // counting goes on
    @(negedge clk); ev = '0;
    chk(mon_done, {tag, " mon_done"});
    for (int k = 0; k < 16; k++) begin
      bus_rd(13'h1B00 + 13'(4*k), d);
      chk(d == model[k], $sformatf("%s counter %0d = %0d, expected %0d", tag, k, d, model[k]));
    end
    for (int k = 0; k < 16; k++) model[k] = 1;             // the one clock after start
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev = '0; mon_start = 0; req = BUS_IDLE; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    chk(!mon_done, "mon_done low after reset");
    for (int k = 0; k < 16; k++) model[k] = 0;
    run(500);
    latch_and_check("first");
    run(300);
    latch_and_check("second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
