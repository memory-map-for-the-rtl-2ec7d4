// stc_channel_tb: checks the address decode of one channel's memory space.
//
// Writes distinct data to the gain/offset table, bad-channel table, data-type
// and threshold registers, then reads each back through the channel, checking
// that every address reaches its own memory and no other, that the Test LUT
// range and holes read 0, and that the data-path ports (gain/offset and
// bad-channel lookups, data-type lookup, thresholds) and the monitor readout
// work through the wrapper.
module stc_channel_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic [15:0] mon_events;
  logic mon_start, mon_done, accept_bad_chip, dt_discard, pa_axial, z_not_stereo, bc_bad;
  logic [3:0] dt_chip, bc_chip, go_chip;
  data_type_e dt_type;
  logic [10:0] pa_energy;
  logic [2:0] pa_code, hdi_id;
  thresholds_t thr;
  logic [7:0] seq_id, go_vtm, go_corr;
  logic [6:0] bc_strip;
  stc_channel dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [12:0] a, input logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: 18'(a), wdata: d};
    @(negedge clk); req = BUS_IDLE;
  endtask
  task automatic bus_rd(input logic [12:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: 18'(a), wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    req = BUS_IDLE; mon_events = 0; mon_start = 0; accept_bad_chip = 0;
    dt_chip = 0; pa_energy = 0; pa_axial = 0; bc_chip = 0; bc_strip = 0; go_chip = 0; go_vtm = 0;
    rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    bus_wr(13'h0000, 32'h0302_0100);       // gain/offset chip 0, values 0..3
    bus_wr(13'h0804, 32'h4433_2211);       // chip 8, values 4..7
    bus_wr(13'h1800, 32'h0000_8001);       // bad channel chip 0 group 0
    bus_wr(13'h1914, 32'h0000_0100);       // chip 8 group 5
    bus_wr(13'h1A44, 32'h2);               // chip 1 axial
    bus_wr(13'h1A90, 32'h77);              // axial threshold 1
    bus_wr(13'h1AA4, 32'h3C);              // sequencer id
    bus_rd(13'h0000, d); chk(d == 32'h0302_0100, "gain/offset chip 0");
    bus_rd(13'h0804, d); chk(d == 32'h4433_2211, "gain/offset chip 8");
    bus_rd(13'h1800, d); chk(d == 32'h0000_8001, "bad channel chip 0 group 0");
    bus_rd(13'h1914, d); chk(d == {9'd0, 4'd8, 3'd5, 16'h0100}, "bad channel chip 8 group 5");
    bus_rd(13'h1A44, d); chk(d == 32'h2, "data type chip 1");
    bus_rd(13'h1A90, d); chk(d == 32'h0077_0077, "axial threshold 1 with mirror");
    bus_rd(13'h1AA4, d); chk(d == 32'h003C_003C, "sequencer id with mirror");
    bus_rd(13'h1000, d); chk(d == 0, "test LUT range reads 0 here");
    bus_rd(13'h1B00, d); chk(d == 0, "monitor after reset");
    // lookups
    @(negedge clk); go_chip = 8; go_vtm = 8'h06; bc_chip = 8; bc_strip = 7'd88; dt_chip = 1;
    @(negedge clk);
    chk(go_corr == 8'h33, "gain/offset lookup");
    chk(bc_bad, "bad channel lookup chip 8 strip 88");
    chk(dt_type == DT_AXIAL && !dt_discard, "data type lookup");
    chk(thr.axial1 == 8'h77 && seq_id == 8'h3C, "threshold and id outputs");
    // monitor: 5 clocks of strips on chip 2
    @(negedge clk); mon_events = 16'h0004;
    repeat (5) @(negedge clk);
    mon_events = 0; mon_start = 1; @(negedge clk); mon_start = 0;
    chk(mon_done, "monitor done");
    bus_rd(13'h1B08, d); chk(d == 5, $sformatf("monitor chip 2 count %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
