// stc_pkg: types and constants shared by the STC logic.
//
// The STC (silicon track card) logic is reached from its host through an 18-bit
// byte address. This package holds the bus request type used on every internal
// register/memory port, the encodings named by the memory map (data types,
// road-address fields, test-data words, threshold set) and the road-memory
// check-bit function. The address constants are the memory map's own numbers;
// the bus request struct and its one-clock read latency are this design's choice.
package stc_pkg;

  // One bus cycle: rd or wr for one clock, byte address, write data.
  // Read data is returned by the addressed block one clock later.
  typedef struct packed {
    logic        rd;
    logic        wr;
    logic [17:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  localparam bus_req_t BUS_IDLE = '{rd: 1'b0, wr: 1'b0, addr: '0, wdata: '0};

  // Top-level spaces, PCI address bits 17:16.
  typedef enum logic [1:0] {
    SPACE_ROAD = 2'd0,   // 0x00000 road memory page
    SPACE_L3   = 2'd1,   // 0x10000 L3 memory page
    SPACE_CTRL = 2'd2,   // 0x20000 control logic
    SPACE_CHAN = 2'd3    // 0x30000 channel logic
  } space_e;

  // Channel memory base offsets, PCI address bits 12:0.
  localparam logic [12:0] CH_MONITOR  = 13'h1B00;
  localparam logic [12:0] CH_MISC     = 13'h1A00;
  localparam logic [12:0] CH_BADCHAN  = 13'h1800;
  localparam logic [12:0] CH_TESTLUT  = 13'h1000;
  localparam logic [12:0] CH_GAINOFS  = 13'h0000;

  // Miscellaneous sub-spaces (offsets inside 0x1A00).
  localparam logic [7:0] MISC_PULSE  = 8'h00;  // 0x1A00..0x1A3F
  localparam logic [7:0] MISC_DTYPE  = 8'h40;  // 0x1A40..0x1A7F
  localparam logic [7:0] MISC_THRESH = 8'h80;  // 0x1A80..0x1A9F
  localparam logic [7:0] MISC_HDI    = 8'hA0;  // 0x1AA0
  localparam logic [7:0] MISC_SEQ    = 8'hA4;  // 0x1AA4

  // Control-logic registers, offsets from 0x28000.
  localparam logic [7:0] REG_L3_PA    = 8'h00;
  localparam logic [7:0] REG_ROAD_PA  = 8'h04;
  localparam logic [7:0] REG_RUN_CTL  = 8'h08;
  localparam logic [7:0] REG_MISC_CSR = 8'h0C;
  localparam logic [7:0] REG_INIT_TIM = 8'h10;
  localparam logic [7:0] REG_FRC_DL   = 8'h14;
  localparam logic [7:0] REG_L3_CONF  = 8'h18;
  localparam logic [7:0] REG_SEC_OFS  = 8'h1C;
  localparam logic [7:0] REG_TEST     = 8'h20;
  localparam logic [7:0] REG_L3_WCNT  = 8'h24;
  localparam logic [7:0] REG_LRB_MON  = 8'h40;  // 16 words, 0x40..0x7C

  // RUN-CTL bits.
  localparam int RUN_RUN       = 0;
  localparam int RUN_TESTMODE  = 1;
  localparam int RUN_SCL_READY = 3;
  localparam int RUN_ZVC_EN    = 4;
  localparam int RUN_ACCEPT_BAD= 5;
  localparam int RUN_THREE_STR = 6;
  localparam int RUN_BUF_EN    = 7;
  localparam int RUN_CH_EN     = 8;   // bits 15:8

  // MISC-CSR command bits (pulses).
  localparam int CMD_RESET_ALL  = 0;
  localparam int CMD_CLR_ROADERR= 1;
  localparam int CMD_CLR_MISM   = 3;
  localparam int CMD_MON_START  = 4;
  localparam int CMD_TEST_START = 5;

  // MISC-CSR status bits.
  localparam int STS_L3_AVAIL   = 0;
  localparam int STS_ROAD_CORR  = 1;
  localparam int STS_ROAD_UNC   = 2;
  localparam int STS_MON_DONE   = 4;
  localparam int STS_HIT_FULL   = 5;
  localparam int STS_ZC_FULL    = 6;
  localparam int STS_L3_FULL    = 7;
  localparam int STS_MISMATCH   = 8;  // bits 15:8

  // 2-bit data type per SVXII chip.
  typedef enum logic [1:0] {
    DT_UNDEF  = 2'b00,   // illegal chip id
    DT_STEREO = 2'b01,
    DT_AXIAL  = 2'b10,
    DT_Z      = 2'b11
  } data_type_e;

  // Road-memory byte address bits 21:2 (below the bank bit).
  typedef struct packed {
    logic       sign;      // address(21)
    logic [1:0] pt_bin;    // address(20:19)
    logic [2:0] pt_ext;    // address(18:16)
    logic [5:0] rel_phi;   // address(15:10)
    logic [4:0] rel_sect;  // address(9:5)
    logic [2:0] chan;      // address(4:2)
  } road_addr_t;

  // One Test LUT word, bits 21:0.
  typedef struct packed {
    logic       stop;      // 21: last word of an event
    logic       eof;       // 20: last word of the file
    logic       cav;       // 19
    logic       dav;       // 18
    logic       lnkrdy;    // 17
    logic       error;     // 16
    logic [7:0] odd;       // 15:8
    logic [7:0] even;      // 7:0
  } test_word_t;

  // Clustering thresholds (8 bits each, Threshold2 > Threshold1).
  typedef struct packed {
    logic [7:0] stereo1, stereo2, axial1, axial2, z1, z2;
  } thresholds_t;

  // Check bits of one 11-bit centroid number, in the order data(22..26)
  // for the lower half (data(27..31) for the upper half).
  function automatic logic [4:0] ecc_half(input logic [10:0] d);
    logic [4:0] c;
    c[0] = ~(d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[8] ^ d[10]);
    c[1] =   d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6] ^ d[9] ^ d[10];
    c[2] = ~(d[1] ^ d[2] ^ d[3] ^ d[7] ^ d[8] ^ d[9] ^ d[10]);
    c[3] =   d[4] ^ d[5] ^ d[6] ^ d[7] ^ d[8] ^ d[9] ^ d[10];
    c[4] =   d[0] ^ d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7] ^ d[10];
    return c;
  endfunction

endpackage
