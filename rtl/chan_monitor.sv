// chan_monitor: the MONITOR space of one STC channel (0x1B00-0x1B3C).
//
// Sixteen 32-bit counters run while data flow: strips seen on chips 0..8,
// SMT data with the VTM error bit, sequencer/HDI mismatches, chip-id format
// errors, and undefined, stereo, axial and 90-degree centroids (counter k is
// read at 0x1B00 + 4k, in the memory map's order). Counter k adds one in every
// clock in which events[k] is high. A MONITOR-START pulse copies all running
// counters into the read-only readout registers in the same clock, restarts
// the running counters from zero and raises mon_done, which stays high until
// the next MONITOR-START. The counter set and addresses follow the memory map;
// the latch/restart behaviour and the one-per-clock increment are this design's
// choice. Bus reads return the readout registers one clock after rd; writes are
// ignored (the space is read only).
module chan_monitor
  import stc_pkg::*;
#(
  parameter int NCNT = 16
) (
  input  logic            clk,
  input  logic            rst,          // hardware or soft reset
  input  logic [NCNT-1:0] events,
  input  logic            mon_start,
  output logic            mon_done,
  input  bus_req_t        req,
  output logic [31:0]     rdata
);
  logic [31:0] running [NCNT];
  logic [31:0] latched [NCNT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NCNT; k++) begin
        running[k] <= '0;
        latched[k] <= '0;
      end
      mon_done <= 1'b0;
    end else begin
      for (int k = 0; k < NCNT; k++) begin
        if (mon_start) begin
          latched[k] <= running[k] + 32'(events[k]);
          running[k] <= '0;
        end else begin
          running[k] <= running[k] + 32'(events[k]);
        end
      end
      if (mon_start) mon_done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) rdata <= (int'(req.addr[7:2]) < NCNT) ? latched[req.addr[5:2]] : '0;
  end
endmodule
