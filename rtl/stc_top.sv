// stc_top: the STC logic as seen through its 18-bit host address space.
//
// The STC (silicon track card) processes the strip data of eight SMT channels.
// This top holds everything the host downloads into it and the control logic
// that runs it, and decodes the host's byte address like the memory map:
//   bits 17:16 = 0  road memory, 64-kbyte page chosen by ROAD-PA   (road_mem)
//              = 1  L3 memory,   64-kbyte page chosen by L3-PA     (l3_buffer)
//              = 2  control logic: 0x20000-0x27FFF L3-DATA window  (l3_buffer)
//                                  0x28000-0x2807F registers       (ctrl_regs)
//              = 3  channel logic: bits 15:13 pick channel 0..7, bits 12:0
//                   the memory in it (stc_channel); 0x1000-0x17FF is the
//                   Test LUT shared by channels 2k and 2k+1 (test_lut)
// The control registers drive the rest: MISC-CSR command pulses reset all
// control and channel logic (one clock after the write), clear the road error
// flags and the event mismatch flags, start the monitors and start test-data
// playback; RUN-CTL's test-mode and accept-bad-chip bits go to the Test LUTs
// and channels, and TEST bit 8 makes playback use the internal test clock
// instead of the per-pair VTM strobe inputs. Status from the road memory,
// L3 buffer and monitors is read
// back in MISC-CSR.
//
// Host interface (this design's choice; the memory map defines only
// addresses): bus_req carries rd or wr for one clock; read data comes back on
// bus_rdata with bus_rvalid two clocks after rd. Writes take effect at once.
// The channel data-path ports (gain/offset, bad-channel, data-type and
// pulse-area lookups, thresholds, monitor strobes, mismatch pulses), the
// playback words, the road lookup port and the L3 event-builder input lead to
// logic that the memory map does not describe and are brought out as ports.
module stc_top
  import stc_pkg::*;
#(
  parameter int         NCH     = 8,
  parameter int         ROAD_AW = 21,
  parameter int         L3_AW   = 20,
  parameter logic [7:0] VERSION = 8'd1
) (
  input  logic        clk,
  input  logic        rst,
  // host bus
  input  bus_req_t    bus_req,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // per-channel data path
  input  logic [15:0] mon_events [NCH],
  input  logic [7:0]  mismatch,
  input  logic [3:0]  dt_chip    [NCH],
  output data_type_e  dt_type    [NCH],
  output logic        dt_discard [NCH],
  input  logic [10:0] pa_energy  [NCH],
  input  logic        pa_axial   [NCH],
  output logic [2:0]  pa_code    [NCH],
  output thresholds_t thr        [NCH],
  output logic [7:0]  seq_id     [NCH],
  output logic [2:0]  hdi_id     [NCH],
  output logic        z_not_stereo [NCH],
  input  logic [3:0]  bc_chip    [NCH],
  input  logic [6:0]  bc_strip   [NCH],
  output logic        bc_bad     [NCH],
  input  logic [3:0]  go_chip    [NCH],
  input  logic [7:0]  go_vtm     [NCH],
  output logic [7:0]  go_corr    [NCH],
  // test data playback, one stream per channel pair
  output logic        tw_valid   [NCH/2],
  output test_word_t  tw         [NCH/2],
  output logic        tw_event_end [NCH/2],
  input  logic        vtm_strobe [NCH/2],
  // road lookup
  input  logic        lk_req,
  input  logic        lk_bank,
  input  road_addr_t  lk_addr,
  output logic        lk_valid,
  output logic [10:0] lk_lower,
  output logic [10:0] lk_upper,
  // L3 event builder
  input  logic        ev_we,
  input  logic [31:0] ev_data,
  input  logic        ev_last,
  // status from outside and control outputs
  input  logic        hit_buf_full,
  input  logic        zc_buf_full,
  input  logic        scl_done,
  output logic [15:0] run_ctl,
  output logic [11:0] init_time,
  output logic [15:0] frc_dl,
  output logic [25:0] l3_conf,
  output logic [6:0]  sec_offset,
  output logic [9:0]  test_reg,
  output logic [31:0] lrb_mon [16]
);
  localparam int NPAIR = NCH / 2;

  function automatic bus_req_t gate(input bus_req_t r, input logic en);
    bus_req_t g = r;
    g.rd = r.rd && en;
    g.wr = r.wr && en;
    return g;
  endfunction

  // ---------------- soft reset and commands
  logic [15:0] cmd;
  logic        srst;
  assign srst = rst || cmd[CMD_RESET_ALL];

  // ---------------- address decode
  typedef enum logic [2:0] {T_NONE, T_ROAD, T_L3, T_CTRL, T_CHAN, T_TEST} tgt_e;
  space_e     space;
  logic [2:0] ch;
  tgt_e       tgt, tgt_q;
  logic       is_fifo;
  logic [2:0] ch_q;

  always_comb begin
    space   = space_e'(bus_req.addr[17:16]);
    ch      = bus_req.addr[15:13];
    is_fifo = 1'b0;
    unique case (space)
      SPACE_ROAD: tgt = T_ROAD;
      SPACE_L3:   tgt = T_L3;
      SPACE_CTRL: begin
        if (!bus_req.addr[15]) begin
          tgt     = T_L3;
          is_fifo = 1'b1;
        end else if (bus_req.addr[14:7] == '0) tgt = T_CTRL;
        else tgt = T_NONE;
      end
      SPACE_CHAN: tgt = (bus_req.addr[12:11] == 2'b10) ? T_TEST : T_CHAN;
      default:    tgt = T_NONE;
    endcase
  end

  // ---------------- control registers
  logic [31:0] rd_ctrl, rd_road, rd_l3;
  logic [5:0]  l3_pa;
  logic [6:0]  road_pa;
  logic [7:0]  status_lo;
  logic        err_corr, err_uncorr, l3_avail, l3_full;
  logic [31:0] l3_wcount;
  logic [NCH-1:0] mon_done;

  assign status_lo = {l3_full, zc_buf_full, hit_buf_full, &mon_done,
                      1'b0, err_uncorr, err_corr, l3_avail};

  ctrl_regs #(.VERSION(VERSION)) u_ctrl (
    .clk, .rst(srst), .req(gate(bus_req, tgt == T_CTRL)), .rdata(rd_ctrl),
    .run_ctl, .cmd, .status_lo, .mismatch, .scl_done, .l3_wcount,
    .l3_pa, .road_pa, .init_time, .frc_dl, .l3_conf, .sec_offset, .test_reg, .lrb_mon);

  // ---------------- road memory
  road_mem #(.ROAD_AW(ROAD_AW)) u_road (
    .clk, .rst(srst), .req(gate(bus_req, tgt == T_ROAD)), .road_pa, .rdata(rd_road),
    .lk_req, .lk_bank, .lk_addr, .lk_valid, .lk_lower, .lk_upper,
    .clr_flags(cmd[CMD_CLR_ROADERR]), .err_corr, .err_uncorr);

  // ---------------- L3 memory / L3-DATA
  l3_buffer #(.L3_AW(L3_AW)) u_l3 (
    .clk, .rst(srst),
    .req_dbg(gate(bus_req, tgt == T_L3 && !is_fifo)),
    .req_fifo(gate(bus_req, tgt == T_L3 && is_fifo)),
    .l3_pa, .rdata(rd_l3), .ev_we, .ev_data, .ev_last,
    .data_avail(l3_avail), .full(l3_full), .wcount(l3_wcount));

  // ---------------- channels
  logic [31:0] rd_ch [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    stc_channel u_ch (
      .clk, .rst(srst),
      .req(gate(bus_req, tgt == T_CHAN && ch == 3'(c))), .rdata(rd_ch[c]),
      .mon_events(mon_events[c]), .mon_start(cmd[CMD_MON_START]), .mon_done(mon_done[c]),
      .accept_bad_chip(run_ctl[RUN_ACCEPT_BAD]),
      .dt_chip(dt_chip[c]), .dt_type(dt_type[c]), .dt_discard(dt_discard[c]),
      .pa_energy(pa_energy[c]), .pa_axial(pa_axial[c]), .pa_code(pa_code[c]),
      .thr(thr[c]), .seq_id(seq_id[c]), .hdi_id(hdi_id[c]), .z_not_stereo(z_not_stereo[c]),
      .bc_chip(bc_chip[c]), .bc_strip(bc_strip[c]), .bc_bad(bc_bad[c]),
      .go_chip(go_chip[c]), .go_vtm(go_vtm[c]), .go_corr(go_corr[c]));
  end

  // ---------------- test LUTs, one per channel pair (address bit 13 ignored)
  logic [31:0] rd_tl [NPAIR];
  logic        tl_busy [NPAIR];   // playback running (observed in simulation only)
  for (genvar p = 0; p < NPAIR; p++) begin : g_tl
    test_lut u_tl (
      .clk, .rst(srst),
      .req(gate(bus_req, tgt == T_TEST && ch[2:1] == 2'(p))), .rdata(rd_tl[p]),
      .test_mode(run_ctl[RUN_TESTMODE]), .test_start(cmd[CMD_TEST_START]),
      .int_clk(test_reg[8]), .vtm_strobe(vtm_strobe[p]),
      .tw_valid(tw_valid[p]), .tw(tw[p]), .tw_event_end(tw_event_end[p]), .busy(tl_busy[p]));
  end

  // ---------------- read return
  logic rd_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0; tgt_q <= T_NONE; ch_q <= '0;
    end else begin
      rd_q <= bus_req.rd;
      if (bus_req.rd) begin
        tgt_q <= tgt;
        ch_q  <= ch;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rvalid <= 1'b0;
      bus_rdata  <= '0;
    end else begin
      bus_rvalid <= rd_q;
      if (rd_q) begin
        case (tgt_q)
          T_ROAD:  bus_rdata <= rd_road;
          T_L3:    bus_rdata <= rd_l3;
          T_CTRL:  bus_rdata <= rd_ctrl;
          T_CHAN:  bus_rdata <= rd_ch[ch_q];
          T_TEST:  bus_rdata <= rd_tl[ch_q[2:1]];
          default: bus_rdata <= '0;
        endcase
      end
    end
  end
endmodule
