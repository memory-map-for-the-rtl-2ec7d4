// ctrl_regs: control-logic registers of the STC (0x28000-0x2807F).
//
// Registers and fields follow the memory map:
//   0x00 L3-PA    L3 memory page, address bits 21:16 (held in bits 5:0)
//   0x04 ROAD-PA  road memory page, address bits 22:16 (held in bits 6:0)
//   0x08 RUN-CTL  set/reset register: a 1 written to bit n<16 sets bit n, a 1
//                 written to bit m>15 clears bit m-16, 0s change nothing.
//                 Bit 0 run, 1 test mode, 3 SCL-READY, 4 ZVC enable, 5 accept
//                 bad chip id, 6 three-strip centroids, 7 internal buffer
//                 control, 15:8 channel enables (all clear after reset).
//                 Reads also show SCL-DONE in bit 19 and VERSION in 31:24.
//   0x0C MISC-CSR writes of 1 to bits 15:0 give one-clock command pulses
//                 (0 reset all, 1 clear road error flags, 3 clear event
//                 mismatch flags, 4 MONITOR-START, 5 test start); bits 31:16
//                 are a plain register. Reads give status in 15:0.
//   0x10 INIT-TIME bits 11:0      0x14 FRC-DL bits 15:0
//   0x18 L3-CONF bits 9:0, 25:16  0x1C SEC-OFFSET bits 6:0
//   0x20 TEST bits 9:0            0x24 L3 event word count (read only here)
//   0x40-0x7C LRB monitor, 16 words of 32 bits
// The event mismatch flags (status 15:8) are sticky copies of per-channel
// pulses, cleared by command bit 3. Bits the memory map does not assign are
// not stored and read 0; that, the bit placement of the page registers and the
// read-only word count are this design's choices. The soft-reset command
// (reset all) is produced here and clears these registers one clock later via
// the rst input, which the parent drives with hardware reset or that pulse.
// Bus reads have one clock of latency.
module ctrl_regs
  import stc_pkg::*;
#(
  parameter logic [7:0] VERSION = 8'd1
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic [15:0] run_ctl,
  output logic [15:0] cmd,
  input  logic [7:0]  status_lo,     // MISC-CSR status bits 7:0
  input  logic [7:0]  mismatch,      // event mismatch pulses, channel 7..0
  input  logic        scl_done,
  input  logic [31:0] l3_wcount,
  output logic [5:0]  l3_pa,
  output logic [6:0]  road_pa,
  output logic [11:0] init_time,
  output logic [15:0] frc_dl,
  output logic [25:0] l3_conf,
  output logic [6:0]  sec_offset,
  output logic [9:0]  test_reg,
  output logic [31:0] lrb_mon [16]
);
  logic [15:0] csr_hi;
  logic [7:0]  mism_flags;
  logic [7:0]  off;
  assign off = req.addr[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      l3_pa <= '0; road_pa <= '0; run_ctl <= '0; csr_hi <= '0;
      init_time <= '0; frc_dl <= '0; l3_conf <= '0; sec_offset <= '0; test_reg <= '0;
      for (int k = 0; k < 16; k++) lrb_mon[k] <= '0;
      mism_flags <= '0;
      cmd <= '0;
    end else begin
      cmd <= '0;
      if (cmd[CMD_CLR_MISM]) mism_flags <= mismatch;
      else                   mism_flags <= mism_flags | mismatch;
      if (req.wr) begin
        if (off >= REG_LRB_MON && off < 8'h80) lrb_mon[off[5:2]] <= req.wdata;
        else case (off)
          REG_L3_PA:    l3_pa      <= req.wdata[5:0];
          REG_ROAD_PA:  road_pa    <= req.wdata[6:0];
          REG_RUN_CTL:  run_ctl    <= (run_ctl | req.wdata[15:0]) & ~req.wdata[31:16] & 16'hFFFB;
          REG_MISC_CSR: begin
            cmd    <= req.wdata[15:0];
            csr_hi <= req.wdata[31:16];
          end
          REG_INIT_TIM: init_time  <= req.wdata[11:0];
          REG_FRC_DL:   frc_dl     <= req.wdata[15:0];
          REG_L3_CONF:  l3_conf    <= {req.wdata[25:16], 6'd0, req.wdata[9:0]};
          REG_SEC_OFS:  sec_offset <= req.wdata[6:0];
          REG_TEST:     test_reg   <= req.wdata[9:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) begin
      if (off >= REG_LRB_MON && off < 8'h80) rdata <= lrb_mon[off[5:2]];
      else case (off)
        REG_L3_PA:    rdata <= {26'd0, l3_pa};
        REG_ROAD_PA:  rdata <= {25'd0, road_pa};
        REG_RUN_CTL:  rdata <= {VERSION, 4'd0, scl_done, 3'd0, run_ctl[15:3], 1'b0, run_ctl[1:0]};
        REG_MISC_CSR: rdata <= {csr_hi, mism_flags, status_lo[7:4], 1'b0, status_lo[2:0]};
        REG_INIT_TIM: rdata <= {20'd0, init_time};
        REG_FRC_DL:   rdata <= {16'd0, frc_dl};
        REG_L3_CONF:  rdata <= {6'd0, l3_conf};
        REG_SEC_OFS:  rdata <= {25'd0, sec_offset};
        REG_TEST:     rdata <= {22'd0, test_reg};
        REG_L3_WCNT:  rdata <= l3_wcount;
        default:      rdata <= '0;
      endcase
    end
  end
endmodule
