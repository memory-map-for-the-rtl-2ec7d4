// bad_channel_lut: BAD-CHANNEL memory of one STC channel (0x1800-0x191C).
//
// One status bit per strip, '1' marking a strip known to be bad. Each chip
// (0..NCHIP-1) has 128 strips in 8 groups of 16; word 8*chip + group holds the
// 16 bits of one group, strip s of the group in bit s. A bus read returns the
// 16 bits in bits 15:0 and the word's own chip id (4 bits) and group (3 bits)
// in bits 22:16, as the memory map prescribes. The lookup port gives the bit of
// one strip for the clustering logic one clock after it is asked; a chip id
// outside 0..NCHIP-1 reads as good. The word layout and read-back follow the
// memory map; the bit order inside a group and the lookup port are this
// design's own. Bus reads have one clock of latency.
module bad_channel_lut
  import stc_pkg::*;
#(
  parameter int NCHIP = 9
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  input  logic [3:0]  lk_chip,
  input  logic [6:0]  lk_strip,
  output logic        lk_bad
);
  localparam int NW = NCHIP * 8;
  localparam int AW = $clog2(NW);
  logic [15:0] mem [NW];

  logic [8:0]    widx;
  logic [AW-1:0] wa;
  logic          wok;
  assign widx = req.addr[10:2];   // byte offset from 0x1800, in words
  assign wa   = widx[AW-1:0];
  assign wok  = int'(widx) < NW;

  always_ff @(posedge clk) begin
    if (req.wr && wok) mem[wa] <= req.wdata[15:0];
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) begin
      if (wok) rdata <= {9'd0, widx[6:0], mem[wa]};
      else           rdata <= '0;
    end
  end

  logic [AW-1:0] lidx;
  assign lidx = AW'({lk_chip, lk_strip[6:4]});
  always_ff @(posedge clk) begin
    if (rst) lk_bad <= 1'b0;
    else     lk_bad <= (int'(lk_chip) < NCHIP) ? mem[lidx][lk_strip[3:0]] : 1'b0;
  end
endmodule
