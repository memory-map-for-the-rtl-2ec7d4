// stc_channel: the memory space of one STC channel (PCI address bits 12:0).
//
// Decodes a channel's 8-kbyte space, as laid out by the memory map, onto its
// memories and brings out their data-path ports:
//   0x1B00-0x1BFF  MONITOR        (chan_monitor)
//   0x1A00-0x1AFF  MISCELLANEOUS  (chan_misc)
//   0x1800-0x19FF  BAD CHANNEL    (bad_channel_lut)
//   0x1000-0x17FF  TEST LUT       shared by a channel pair, decoded by the
//                                 parent; reads 0 here
//   0x0000-0x0FFF  GAIN OFFSET    (gain_offset_lut)
// Every memory answers a read one clock after the request; the channel picks
// the answer with the registered select, so its read latency is also one
// clock. rst is the hardware reset or the soft reset command.
module stc_channel
  import stc_pkg::*;
#(
  parameter int NCHIP = 9
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  // monitor
  input  logic [15:0] mon_events,
  input  logic        mon_start,
  output logic        mon_done,
  // miscellaneous
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
  output logic        z_not_stereo,
  // bad channel
  input  logic [3:0]  bc_chip,
  input  logic [6:0]  bc_strip,
  output logic        bc_bad,
  // gain offset
  input  logic [3:0]  go_chip,
  input  logic [7:0]  go_vtm,
  output logic [7:0]  go_corr
);
  typedef enum logic [2:0] {SEL_NONE, SEL_MON, SEL_MISC, SEL_BAD, SEL_GO} sel_e;

  sel_e sel, sel_q;
  always_comb begin
    if      (req.addr[12:8] == CH_MONITOR[12:8]) sel = SEL_MON;
    else if (req.addr[12:8] == CH_MISC[12:8])    sel = SEL_MISC;
    else if (req.addr[12:11] == 2'b11)           sel = SEL_BAD;
    else if (req.addr[12] == 1'b0)               sel = SEL_GO;
    else                                         sel = SEL_NONE;
  end

  function automatic bus_req_t gate(input bus_req_t r, input logic en);
    bus_req_t g = r;
    g.rd = r.rd && en;
    g.wr = r.wr && en;
    return g;
  endfunction

  logic [31:0] rd_mon, rd_misc, rd_bad, rd_go;

  chan_monitor u_mon (
    .clk, .rst, .events(mon_events), .mon_start, .mon_done,
    .req(gate(req, sel == SEL_MON)), .rdata(rd_mon));

  chan_misc u_misc (
    .clk, .rst, .req(gate(req, sel == SEL_MISC)), .rdata(rd_misc),
    .accept_bad_chip, .dt_chip, .dt_type, .dt_discard,
    .pa_energy, .pa_axial, .pa_code, .thr, .seq_id, .hdi_id, .z_not_stereo);

  bad_channel_lut #(.NCHIP(NCHIP)) u_bad (
    .clk, .rst, .req(gate(req, sel == SEL_BAD)), .rdata(rd_bad),
    .lk_chip(bc_chip), .lk_strip(bc_strip), .lk_bad(bc_bad));

  gain_offset_lut #(.NCHIP(NCHIP)) u_go (
    .clk, .rst, .req(gate(req, sel == SEL_GO)), .rdata(rd_go),
    .lk_chip(go_chip), .lk_vtm(go_vtm), .lk_corr(go_corr));

  always_ff @(posedge clk) begin
    if (rst)         sel_q <= SEL_NONE;
    else if (req.rd) sel_q <= sel;
  end

  always_comb begin
    case (sel_q)
      SEL_MON:  rdata = rd_mon;
      SEL_MISC: rdata = rd_misc;
      SEL_BAD:  rdata = rd_bad;
      SEL_GO:   rdata = rd_go;
      default:  rdata = '0;
    endcase
  end
endmodule
