// gain_offset_lut: GAIN-OFFSET memory of one STC channel (0x0000-0x08FF).
//
// Corrects raw SMT (VTM) ADC values for offset and scale chip by chip. For
// chip c (0..NCHIP-1) and raw value v (0..255) the corrected 8-bit value is
// the byte at byte address {c, v}: word address bits 11:8 are the chip id,
// bits 7:2 are v/4, and byte v mod 4 of that 32-bit word holds the result.
// The table layout is the memory map's. The bus side reads and writes whole
// words with one clock of read latency; the lookup port returns the corrected
// value one clock after lk_chip/lk_vtm are presented (a chip id outside the
// table returns 0). The second read port for the data path is this design's.
module gain_offset_lut
  import stc_pkg::*;
#(
  parameter int NCHIP = 9
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  input  logic [3:0]  lk_chip,
  input  logic [7:0]  lk_vtm,
  output logic [7:0]  lk_corr
);
  localparam int NW = NCHIP * 64;
  logic [31:0] mem [NW];

  logic [9:0] widx;
  logic       wok;
  assign widx = {req.addr[11:8], req.addr[7:2]};
  assign wok  = (req.addr[12] == 1'b0) && (int'(req.addr[11:8]) < NCHIP);

  always_ff @(posedge clk) begin
    if (req.wr && wok) mem[widx] <= req.wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) rdata <= wok ? mem[widx] : '0;
  end

  logic [9:0]  lidx;
  logic [31:0] lword;
  assign lidx  = {lk_chip, lk_vtm[7:2]};
  assign lword = mem[lidx];
  always_ff @(posedge clk) begin
    if (rst) lk_corr <= '0;
    else     lk_corr <= (int'(lk_chip) < NCHIP) ? lword[8*lk_vtm[1:0] +: 8] : 8'd0;
  end
endmodule
