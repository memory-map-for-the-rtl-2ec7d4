// ctrl_regs_tb: checks the control-logic register file.
//
// Covers: plain registers keep only their assigned bits; RUN-CTL sets with
// 1s in 15:0 and clears with 1s in 31:16, ignores 0s and bit 2, and reads
// SCL-DONE and VERSION; MISC-CSR bits 15:0 give one-clock command pulses and
// 31:16 are kept; status bits read back; mismatch flags are sticky until
// command bit 3; the LRB monitor words and the word-count read-through.
module ctrl_regs_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic [15:0] run_ctl, cmd;
  logic [7:0] status_lo, mismatch;
  logic scl_done;
  logic [31:0] l3_wcount;
  logic [5:0] l3_pa;
  logic [6:0] road_pa, sec_offset;
  logic [11:0] init_time;
  logic [15:0] frc_dl;
  logic [25:0] l3_conf;
  logic [9:0] test_reg;
  logic [31:0] lrb_mon [16];
  ctrl_regs #(.VERSION(8'h5A)) dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: 18'h28000 | 18'(a), wdata: d};
    @(negedge clk); req = BUS_IDLE;
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: 18'h28000 | 18'(a), wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask

  int cmd_clocks;
  logic [15:0] cmd_seen;
  always @(posedge clk) if (cmd != 0) begin cmd_clocks++; cmd_seen = cmd; end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    req = BUS_IDLE; status_lo = 0; mismatch = 0; scl_done = 0; l3_wcount = 0; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    cmd_clocks = 0;
    bus_wr(REG_L3_PA, '1);    bus_rd(REG_L3_PA, d);    chk(d == 32'h3F && l3_pa == 6'h3F, "L3-PA");
    bus_wr(REG_ROAD_PA, '1);  bus_rd(REG_ROAD_PA, d);  chk(d == 32'h7F && road_pa == 7'h7F, "ROAD-PA");
    bus_wr(REG_INIT_TIM, '1); bus_rd(REG_INIT_TIM, d); chk(d == 32'hFFF, "INIT-TIME");
    bus_wr(REG_FRC_DL, '1);   bus_rd(REG_FRC_DL, d);   chk(d == 32'hFFFF, "FRC-DL");
    bus_wr(REG_L3_CONF, '1);  bus_rd(REG_L3_CONF, d);  chk(d == 32'h03FF_03FF, "L3-CONF");
    bus_wr(REG_SEC_OFS, 32'h48); bus_rd(REG_SEC_OFS, d); chk(d == 32'h48 && sec_offset == 7'h48, "SEC-OFFSET");
    bus_wr(REG_TEST, '1);     bus_rd(REG_TEST, d);     chk(d == 32'h3FF, "TEST");
    // RUN-CTL set/reset
    bus_rd(REG_RUN_CTL, d); chk(d == 32'h5A00_0000, $sformatf("RUN-CTL after reset %h", d));
    bus_wr(REG_RUN_CTL, 32'h0000_0F23); chk(run_ctl == 16'h0F23 - 16'h0000, "RUN-CTL set");
    bus_wr(REG_RUN_CTL, 32'h0000_0004); chk(run_ctl == 16'h0F23, "RUN-CTL bit 2 unused");
    bus_wr(REG_RUN_CTL, 32'h0000_0010); chk(run_ctl == 16'h0F33, "RUN-CTL set more, 0s keep");
    bus_wr(REG_RUN_CTL, 32'h0201_0000); chk(run_ctl == 16'h0D32, $sformatf("RUN-CTL reset bits 0,9: %h", run_ctl));
    scl_done = 1;
    bus_rd(REG_RUN_CTL, d); chk(d == 32'h5A08_0D32, $sformatf("RUN-CTL read %h", d));
    // MISC-CSR commands
    bus_wr(REG_MISC_CSR, 32'hABCD_0030);
    repeat (3) @(negedge clk);
    chk(cmd_clocks == 1 && cmd_seen == 16'h0030, $sformatf("one command pulse, %0d clocks %h", cmd_clocks, cmd_seen));
    status_lo = 8'b1101_0111;
    bus_rd(REG_MISC_CSR, d); chk(d == 32'hABCD_00D7, $sformatf("MISC-CSR read %h", d));
    // mismatch flags
    @(negedge clk); mismatch = 8'h12; @(negedge clk); mismatch = 8'h80; @(negedge clk); mismatch = 0;
    bus_rd(REG_MISC_CSR, d); chk(d[15:8] == 8'h92, $sformatf("sticky mismatch %h", d[15:8]));
    bus_wr(REG_MISC_CSR, 32'h0000_0008);
    @(negedge clk);
    bus_rd(REG_MISC_CSR, d); chk(d[15:8] == 8'h00, "mismatch cleared");
    // LRB monitor and word count
    for (int k = 0; k < 16; k++) bus_wr(REG_LRB_MON + 8'(4*k), 32'h1000_0000 * 32'(k) + 32'(k));
    for (int k = 0; k < 16; k++) begin
      bus_rd(REG_LRB_MON + 8'(4*k), d);
      chk(d == 32'h1000_0000 * 32'(k) + 32'(k) && lrb_mon[k] == d, $sformatf("LRB mon %0d", k));
    end
    l3_wcount = 32'd13;
    bus_rd(REG_L3_WCNT, d); chk(d == 13, "word count read-through");
    bus_rd(8'h28, d); chk(d == 0, "unassigned address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
