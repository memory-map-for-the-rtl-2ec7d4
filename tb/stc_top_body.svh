// Shared body of the STC end-to-end testbenches (stc_top_tb, stc_top_full_tb).
// The including module defines RAW (road word-address width) and LAW (L3
// word-address width) and instantiates stc_top as dut with the signals below.
//
// Sequence: download per-channel tables into every channel and read them
// back (channel select); load the example SMT test file into the Test LUT of
// channels 0/1 and play it (test mode + test start); download road words
// into bank 0 and look them up in bank 1 (bank copy), with one and two
// flipped bits (correctable / non-correctable flags in MISC-CSR, cleared by
// command); push two L3 events and read them through L3-DATA and the word
// count register (read over the end, retire, data-available flag); count
// monitor strobes and latch them (MONITOR-START/DONE); discard and accept a
// chip with an illegal id; set and clear event mismatch flags; RUN-CTL
// set/reset; and the soft reset command. Each mechanism is counted and one
// that never happened counts as a failure.
  import stc_pkg::*;
  localparam int NCH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  bus_req_t    bus_req;
  logic [31:0] bus_rdata;
  logic        bus_rvalid;
  logic [15:0] mon_events [NCH];
  logic [7:0]  mismatch;
  logic [3:0]  dt_chip [NCH];
  data_type_e  dt_type [NCH];
  logic        dt_discard [NCH];
  logic [10:0] pa_energy [NCH];
  logic        pa_axial [NCH];
  logic [2:0]  pa_code [NCH];
  thresholds_t thr [NCH];
  logic [7:0]  seq_id [NCH];
  logic [2:0]  hdi_id [NCH];
  logic        z_not_stereo [NCH];
  logic [3:0]  bc_chip [NCH];
  logic [6:0]  bc_strip [NCH];
  logic        bc_bad [NCH];
  logic [3:0]  go_chip [NCH];
  logic [7:0]  go_vtm [NCH];
  logic [7:0]  go_corr [NCH];
  logic        tw_valid [NCH/2];
  test_word_t  tw [NCH/2];
  logic        tw_event_end [NCH/2];
  logic        vtm_strobe [NCH/2];
  logic        lk_req, lk_bank, lk_valid;
  road_addr_t  lk_addr;
  logic [10:0] lk_lower, lk_upper;
  logic        ev_we, ev_last;
  logic [31:0] ev_data;
  logic        hit_buf_full, zc_buf_full, scl_done;
  logic [15:0] run_ctl;
  logic [11:0] init_time;
  logic [15:0] frc_dl;
  logic [25:0] l3_conf;
  logic [6:0]  sec_offset;
  logic [9:0]  test_reg;
  logic [31:0] lrb_mon [16];

  // mechanism counters
  int m_chan_sel, m_bit13, m_test_word, m_test_event, m_test_eof, m_bank_copy, m_ecc_corr,
      m_ecc_unc, m_ecc_clear, m_l3_event, m_l3_over, m_l3_retire, m_mon_latch, m_discard,
      m_accept, m_mismatch, m_setreset, m_soft_reset, m_page, m_gain, m_pulse, m_test_strobe;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk); bus_req = '{rd: 1'b0, wr: 1'b1, addr: a, wdata: d};
    @(negedge clk); bus_req = BUS_IDLE;
  endtask
  task automatic bus_rd(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk); bus_req = '{rd: 1'b1, wr: 1'b0, addr: a, wdata: '0};
    @(negedge clk); bus_req = BUS_IDLE;
    @(negedge clk);
    chk(bus_rvalid, "read valid two clocks after rd");
    d = bus_rdata;
  endtask
  function automatic logic [17:0] chan_addr(input int c, input logic [12:0] off);
    return {2'b11, 3'(c), off};
  endfunction

  // road-word check bits, from the Hamming position table
  localparam int POS [11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};
  function automatic logic [4:0] ref_half(input logic [10:0] x);
    logic [4:0] r = '0;
    for (int i = 0; i < 11; i++) begin
      for (int k = 0; k < 4; k++) if (POS[i][k]) r[k] ^= x[i];
      if ($countones(POS[i]) % 2 == 0) r[4] ^= x[i];
    end
    return r ^ 5'b00101;
  endfunction
  logic [21:0] enc_in;
  logic [31:0] enc_out;
  always_comb enc_out = {ref_half(enc_in[21:11]), ref_half(enc_in[10:0]), enc_in};
  task automatic encode(input logic [21:0] v, output logic [31:0] e);
    enc_in = v; #1; e = enc_out;
  endtask

  localparam logic [21:0] SMT_FILE [22] = '{
    22'h080505, 22'h080002, 22'h0882c0, 22'h0800c0, 22'h080ac0, 22'h0803c0, 22'h080bc0,
    22'h0818c0, 22'h08c0c0, 22'h28c0c0,
    22'h080505, 22'h080002, 22'h088280, 22'h080000, 22'h085152, 22'h08020e, 22'h085553,
    22'h080c0a, 22'h0856c0, 22'h0805c0, 22'h08c0c0, 22'h38c0c0};

  int tw_idx;
  always @(negedge clk) if (!rst && tw_valid[0]) begin
    chk(tw_idx < 22 && tw[0] == test_word_t'(SMT_FILE[tw_idx]), $sformatf("test word %0d", tw_idx));
    m_test_word++;
    if (tw_event_end[0]) m_test_event++;
    if (tw[0].eof) m_test_eof++;
    tw_idx++;
  end

  task automatic road_lookup(input logic bank, input logic [19:0] a, output logic [21:0] v);
    @(negedge clk); lk_req = 1; lk_bank = bank; lk_addr = road_addr_t'(a);
    @(negedge clk); lk_req = 0;
    @(negedge clk);
    chk(lk_valid, "road lookup valid after 2 clocks");
    v = {lk_upper, lk_lower};
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, e;
    logic [21:0] v;
    logic [31:0] road_words [64];
    logic [21:0] road_img [64];
    bus_req = BUS_IDLE; mismatch = 0; lk_req = 0; lk_bank = 0; lk_addr = '0;
    ev_we = 0; ev_last = 0; ev_data = 0; hit_buf_full = 0; zc_buf_full = 0; scl_done = 0;
    for (int c = 0; c < NCH; c++) begin
      mon_events[c] = 0; dt_chip[c] = 0; pa_energy[c] = 0; pa_axial[c] = 0;
      bc_chip[c] = 0; bc_strip[c] = 0; go_chip[c] = 0; go_vtm[c] = 0;
    end
    tw_idx = 0;
    {m_chan_sel, m_bit13, m_test_word, m_test_event, m_test_eof, m_bank_copy, m_ecc_corr,
     m_ecc_unc, m_ecc_clear, m_l3_event, m_l3_over, m_l3_retire, m_mon_latch, m_discard,
     m_accept, m_mismatch, m_setreset, m_soft_reset, m_page, m_gain, m_pulse, m_test_strobe} = '0;
    for (int p = 0; p < NCH/2; p++) vtm_strobe[p] = 1'b0;
    rst = 1;
    repeat (4) @(negedge clk); rst = 0;

    // ---- per-channel downloads and channel select
    for (int c = 0; c < NCH; c++) begin
      bus_wr(chan_addr(c, 13'h1AA4), 32'(8'h10 + c));            // sequencer id
      bus_wr(chan_addr(c, 13'h1AA0), 32'(c % 8));                // HDI id
      bus_wr(chan_addr(c, 13'h0100 + 13'(4 * c)), 32'hA0B0C0D0 + 32'(c)); // gain/offset chip 1
      bus_wr(chan_addr(c, 13'h1A40), 32'h0);                     // chip 0 illegal
      bus_wr(chan_addr(c, 13'h1A44), 32'h2);                     // chip 1 axial
      for (int k = 0; k < 7; k++)                                // axial pulse-area thresholds
        bus_wr(chan_addr(c, 13'h1A04 + 13'(4 * k)), 32'(100 * (k + 1)));
    end
    for (int c = 0; c < NCH; c++) begin
      bus_rd(chan_addr(c, 13'h1AA4), d);
      chk(d == {8'd0, 8'(8'h10 + c), 8'd0, 8'(8'h10 + c)}, $sformatf("channel %0d sequencer id %h", c, d));
      chk(seq_id[c] == 8'(8'h10 + c) && hdi_id[c] == 3'(c), "id outputs");
      if (d[7:0] == 8'(8'h10 + c)) m_chan_sel++;
      go_chip[c] = 1; go_vtm[c] = 8'(4 * c + c % 4);
    end
    @(negedge clk); @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      logic [31:0] w;
      w = 32'hA0B0C0D0 + 32'(c);
      chk(go_corr[c] == w[8*(c%4) +: 8], $sformatf("gain/offset lookup channel %0d", c));
      if (go_corr[c] == w[8*(c%4) +: 8]) m_gain++;
      pa_axial[c] = 1; pa_energy[c] = 11'd150;
    end
    #1;
    chk(pa_code[3] == 3'd1, "pulse area code");
    if (pa_code[3] == 3'd1) m_pulse++;

    // ---- illegal chip id: discard, then accept with RUN-CTL bit 5
    dt_chip[2] = 0; #1;
    chk(dt_discard[2] && dt_type[2] == DT_UNDEF, "illegal chip discarded");
    if (dt_discard[2]) m_discard++;
    bus_wr(18'h28008, 32'h0000_0020);
    #1;
    chk(!dt_discard[2] && run_ctl[RUN_ACCEPT_BAD], "illegal chip accepted");
    if (!dt_discard[2]) m_accept++;
    bus_wr(18'h28008, 32'h0020_0000);
    chk(!run_ctl[RUN_ACCEPT_BAD], "RUN-CTL bit 5 cleared");
    if (!run_ctl[RUN_ACCEPT_BAD]) m_setreset++;

    // ---- Test LUT of pair 0: written through channel 0, read through channel 1
    for (int k = 0; k < 22; k++) bus_wr(chan_addr(0, 13'h1000 + 13'(4 * k)), {10'd0, SMT_FILE[k]});
    for (int k = 0; k < 22; k += 7) begin
      bus_rd(chan_addr(1, 13'h1000 + 13'(4 * k)), d);
      chk(d == {10'd0, SMT_FILE[k]}, "test LUT shared by the pair");
      if (d == {10'd0, SMT_FILE[k]}) m_bit13++;
    end
    bus_wr(18'h28008, 32'h0000_0002);                 // test mode
    bus_wr(18'h28020, 32'h0000_0100);                 // TEST: internal test clock
    bus_wr(18'h2800C, 32'h0000_0020);                 // test start
    repeat (30) @(negedge clk);
    chk(tw_idx == 22, $sformatf("22 test words played, got %0d", tw_idx));
    // second playback paced by the VTM strobe: nothing without it, one word per strobe
    bus_wr(18'h28020, 32'h0000_0000);
    tw_idx = 0;
    bus_wr(18'h2800C, 32'h0000_0020);
    repeat (30) @(negedge clk);
    chk(tw_idx == 0, $sformatf("no test words without VTM strobe, got %0d", tw_idx));
    for (int k = 0; k < 10; k++) begin
      vtm_strobe[0] = 1'b1; @(negedge clk); vtm_strobe[0] = 1'b0; repeat (2) @(negedge clk);
    end
    chk(tw_idx == 10, $sformatf("10 strobes play 10 words, got %0d", tw_idx));
    vtm_strobe[0] = 1'b1; repeat (20) @(negedge clk); vtm_strobe[0] = 1'b0;
    chk(tw_idx == 22, $sformatf("strobe-paced playback complete, got %0d", tw_idx));
    if (tw_idx == 22) m_test_strobe++;

    // ---- road memory: bank 0 download, bank 1 lookup
    bus_wr(18'h28004, 32'h00);                        // ROAD-PA page 0
    for (int i = 0; i < 64; i++) begin
      road_img[i] = 22'($urandom);
      encode(road_img[i], road_words[i]);
      bus_wr({2'b00, 16'(4 * i)}, road_words[i]);
    end
    for (int i = 0; i < 64; i += 9) begin
      road_lookup(1'b1, 20'(i), v);
      chk(v == road_img[i], $sformatf("bank 1 lookup %0d", i));
      if (v == road_img[i]) m_bank_copy++;
    end
    bus_wr(18'h28004, 32'h40);                        // ROAD-PA page of bank 1
    bus_rd({2'b00, 16'(4 * 3)}, d);
    chk(d == road_words[3], "bank 1 read through its page");
    if (d == road_words[3]) m_page++;
    bus_wr(18'h28004, 32'h00);
    bus_wr({2'b00, 16'(4 * 5)}, road_words[5] ^ 32'h0000_1000);   // one flipped bit
    road_lookup(1'b0, 20'd5, v);
    bus_rd(18'h2800C, d);
    chk(v == road_img[5] && d[STS_ROAD_CORR] && !d[STS_ROAD_UNC], "correctable error");
    if (d[STS_ROAD_CORR]) m_ecc_corr++;
    bus_wr({2'b00, 16'(4 * 6)}, road_words[6] ^ 32'h0030_0000);   // two flipped bits, upper half
    road_lookup(1'b0, 20'd6, v);
    bus_rd(18'h2800C, d);
    chk(d[STS_ROAD_UNC], "non-correctable error");
    if (d[STS_ROAD_UNC]) m_ecc_unc++;
    bus_wr(18'h2800C, 32'h0000_0002);
    bus_rd(18'h2800C, d);
    chk(!d[STS_ROAD_CORR] && !d[STS_ROAD_UNC], "road error flags cleared");
    if (!d[STS_ROAD_CORR] && !d[STS_ROAD_UNC]) m_ecc_clear++;

    // ---- L3 events
    bus_rd(18'h2800C, d); chk(!d[STS_L3_AVAIL], "no L3 data yet");
    for (int ev = 0; ev < 2; ev++) begin
      for (int k = 0; k < 13 - 4 * ev; k++) begin
        @(negedge clk); ev_we = 1; ev_data = 32'h100 * 32'(ev) + 32'(k); ev_last = (k == 12 - 4 * ev);
      end
      @(negedge clk); ev_we = 0; ev_last = 0;
    end
    bus_rd(18'h2800C, d); chk(d[STS_L3_AVAIL], "L3 data available");
    bus_rd(18'h28024, d); chk(d == 13, $sformatf("word count 13, got %0d", d));
    for (int k = 0; k < 12; k++) begin
      bus_rd(18'h20000 + 18'(4 * k), d); chk(d == 32'(k), "event 1 word");
    end
    bus_rd(18'h20000 + 18'(4 * 13), d);
    bus_rd(18'h28024, e);
    chk(d == 0 && e == 13, "read over the end of event");
    if (d == 0 && e == 13) m_l3_over++;
    bus_rd(18'h20000 + 18'(4 * 12), d); chk(d == 12, "last word of event 1");
    m_l3_event++;
    bus_rd(18'h28024, d); chk(d == 9, $sformatf("word count of event 2, got %0d", d));
    if (d == 9) m_l3_retire++;
    bus_wr(18'h28000, 32'h0);                        // L3-PA page 0
    bus_rd(18'h10000 + 18'(4 * 14), d);              // debug window: event 2 word 1
    chk(d == 32'h101, "L3 debug window");
    for (int k = 0; k < 9; k++) begin
      bus_rd(18'h20000 + 18'(4 * k), d); chk(d == 32'h100 + 32'(k), "event 2 word");
    end
    m_l3_event++;
    bus_rd(18'h2800C, d); chk(!d[STS_L3_AVAIL], "L3 buffer empty again");

    // ---- monitor on channel 5
    @(negedge clk); mon_events[5] = 16'h8001;
    repeat (7) @(negedge clk);
    mon_events[5] = 0;
    bus_wr(18'h2800C, 32'h0000_0010);                // MONITOR-START
    bus_rd(18'h2800C, d); chk(d[STS_MON_DONE], "MONITOR-DONE");
    bus_rd(chan_addr(5, 13'h1B00), d); chk(d == 7, $sformatf("monitor chip 0 count %0d", d));
    bus_rd(chan_addr(5, 13'h1B3C), e); chk(e == 7, "monitor 90-degree count");
    if (d == 7 && e == 7) m_mon_latch++;

    // ---- mismatch flags
    @(negedge clk); mismatch = 8'h24; @(negedge clk); mismatch = 0;
    bus_rd(18'h2800C, d); chk(d[15:8] == 8'h24, "mismatch flags");
    bus_wr(18'h2800C, 32'h0000_0008);
    bus_rd(18'h2800C, e); chk(e[15:8] == 0, "mismatch cleared");
    if (d[15:8] == 8'h24 && e[15:8] == 0) m_mismatch++;

    // ---- soft reset
    bus_wr(18'h28008, 32'h0000_FF01);
    chk(run_ctl == 16'hFF03, "RUN-CTL before soft reset");
    bus_wr(18'h2800C, 32'h0000_0001);
    bus_rd(18'h28008, d);
    chk(d[15:0] == 0 && d[31:24] == 8'd1, $sformatf("RUN-CTL after soft reset %h", d));
    if (d[15:0] == 0) m_soft_reset++;
    bus_rd(chan_addr(4, 13'h1AA4), d);
    chk(d == 0, "channel registers cleared by soft reset");
    bus_rd(chan_addr(4, 13'h0100 + 13'd16), d);
    chk(d == 32'hA0B0C0D4, "tables kept through soft reset");

    $display("mechanisms: chan_sel=%0d bit13=%0d test_words=%0d test_events=%0d test_eof=%0d bank_copy=%0d page=%0d",
             m_chan_sel, m_bit13, m_test_word, m_test_event, m_test_eof, m_bank_copy, m_page);
    $display("  ecc_corr=%0d ecc_unc=%0d ecc_clear=%0d l3_events=%0d l3_over=%0d l3_retire=%0d mon_latch=%0d",
             m_ecc_corr, m_ecc_unc, m_ecc_clear, m_l3_event, m_l3_over, m_l3_retire, m_mon_latch);
    $display("  discard=%0d accept=%0d mismatch=%0d setreset=%0d soft_reset=%0d gain=%0d pulse=%0d test_strobe=%0d",
             m_discard, m_accept, m_mismatch, m_setreset, m_soft_reset, m_gain, m_pulse, m_test_strobe);
    chk(m_chan_sel == NCH && m_bit13 > 0 && m_test_word == 44 && m_test_event == 4 && m_test_eof == 2 &&
        m_test_strobe > 0,
        "mechanisms: channel select, shared LUT, playback");
    chk(m_bank_copy > 0 && m_page > 0 && m_ecc_corr > 0 && m_ecc_unc > 0 && m_ecc_clear > 0,
        "mechanisms: road memory");
    chk(m_l3_event == 2 && m_l3_over > 0 && m_l3_retire > 0 && m_mon_latch > 0,
        "mechanisms: L3 buffer and monitor");
    chk(m_discard > 0 && m_accept > 0 && m_mismatch > 0 && m_setreset > 0 && m_soft_reset > 0 &&
        m_gain == NCH && m_pulse > 0, "mechanisms: control");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
