// chan_misc: the MISCELLANEOUS parameter space of one STC channel (0x1A00-0x1AA7).
//
// Four parameter sets sit here, at the memory map's addresses and bit fields:
//   PULSE-AREA  0x1A04-0x1A1C axial thresholds 1..7, 0x1A24-0x1A3C
//               z-and-stereo thresholds 1..7 (11 bits each, bits 10:0)
//   DATA-TYPE   0x1A40 + 4*chip, 2-bit type for chip ids 0..15 (bits 1:0);
//               bit 15 of every read shows the channel's Z/stereo bit
//   THRESHOLD   0x1A88-0x1A9C stereo, axial and z thresholds 1 and 2 (bits 7:0)
//   SEQ-HDI     0x1AA0 HDI id (bits 2:0), 0x1AA4 sequencer id (bits 7:0)
// The memory map says the thresholds and the sequencer/HDI ids are also held in
// mirror registers in the control logic and L3 event builder, read back in the
// upper bits (23:16, 18:16) of the same addresses. Here each mirror is a second
// register written in the same bus cycle; the thr/seq_id/hdi_id outputs are
// taken from the mirrors, so a read-back compare checks both copies.
// Data-path functions:
//   * data-type lookup: dt_type is the stored type of dt_chip; a chip whose
//     type is 00 is illegal and its strips are discarded (dt_discard) unless
//     ACCEPT-BAD-CHIP is set (memory map);
//   * pulse area: pa_code is the number of the seven thresholds of the
//     selected set (axial or z-and-stereo) that pa_energy reaches (>=). The
//     memory map only says the energy is compared with 7 thresholds to give a
//     3-bit code; the counting rule is this design's.
// The Z/stereo bit is set when a data type of 11 (Z) is written and cleared
// when 01 (stereo) is written; the memory map only says it is stored while the
// data types are downloaded. Lookups are combinational; bus reads have one
// clock of latency.
module chan_misc
  import stc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  input  logic        accept_bad_chip,
  input  logic [3:0]  dt_chip,
  output data_type_e  dt_type,
  output logic        dt_discard,
  input  logic [10:0] pa_energy,
  input  logic        pa_axial,
  output logic [2:0]  pa_code,
  output thresholds_t thr,
  output logic [7:0]  seq_id,
  output logic [2:0]  hdi_id,
  output logic        z_not_stereo
);
  logic [10:0] pa_thr [2][7];    // [0] axial, [1] z-and-stereo
  data_type_e  dtype  [16];
  logic [7:0]  thr_p  [6];       // primary copy, order of the THRESHOLD table
  logic [7:0]  thr_m  [6];       // mirror copy
  logic [7:0]  seq_p, seq_m;
  logic [2:0]  hdi_p, hdi_m;
  logic        zbit;

  logic [7:0] off;
  assign off = req.addr[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < 2; s++) for (int k = 0; k < 7; k++) pa_thr[s][k] <= '0;
      for (int k = 0; k < 16; k++) dtype[k] <= DT_UNDEF;
      for (int k = 0; k < 6; k++) begin thr_p[k] <= '0; thr_m[k] <= '0; end
      seq_p <= '0; seq_m <= '0; hdi_p <= '0; hdi_m <= '0;
      zbit  <= 1'b0;
    end else if (req.wr) begin
      if (off < MISC_DTYPE) begin
        if (off[4:2] != 3'd0) pa_thr[off[5]][off[4:2] - 3'd1] <= req.wdata[10:0];
      end else if (off < MISC_THRESH) begin
        dtype[off[5:2]] <= data_type_e'(req.wdata[1:0]);
        if (req.wdata[1:0] == DT_Z)      zbit <= 1'b1;
        if (req.wdata[1:0] == DT_STEREO) zbit <= 1'b0;
      end else if (off < MISC_HDI) begin
        if (off[4:3] != 2'd0) begin
          thr_p[off[4:2] - 3'd2] <= req.wdata[7:0];
          thr_m[off[4:2] - 3'd2] <= req.wdata[7:0];
        end
      end else if (off == MISC_HDI) begin
        hdi_p <= req.wdata[2:0]; hdi_m <= req.wdata[2:0];
      end else if (off == MISC_SEQ) begin
        seq_p <= req.wdata[7:0]; seq_m <= req.wdata[7:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) begin
      rdata <= '0;
      if (off < MISC_DTYPE) begin
        if (off[4:2] != 3'd0) rdata <= {21'd0, pa_thr[off[5]][off[4:2] - 3'd1]};
      end else if (off < MISC_THRESH) begin
        rdata <= {16'd0, zbit, 13'd0, dtype[off[5:2]]};
      end else if (off < MISC_HDI) begin
        if (off[4:3] != 2'd0)
          rdata <= {8'd0, thr_m[off[4:2] - 3'd2], 8'd0, thr_p[off[4:2] - 3'd2]};
      end else if (off == MISC_HDI) begin
        rdata <= {13'd0, hdi_m, 13'd0, hdi_p};
      end else if (off == MISC_SEQ) begin
        rdata <= {8'd0, seq_m, 8'd0, seq_p};
      end
    end
  end

  always_comb begin
    dt_type    = dtype[dt_chip];
    dt_discard = (dtype[dt_chip] == DT_UNDEF) && !accept_bad_chip;
    pa_code    = '0;
    for (int k = 0; k < 7; k++)
      if (pa_energy >= pa_thr[pa_axial ? 0 : 1][k]) pa_code = pa_code + 3'd1;
    thr = '{stereo1: thr_m[0], stereo2: thr_m[1], axial1: thr_m[2],
            axial2:  thr_m[3], z1:      thr_m[4], z2:     thr_m[5]};
    seq_id       = seq_m;
    hdi_id       = hdi_m;
    z_not_stereo = zbit;
  end
endmodule
