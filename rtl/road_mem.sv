// road_mem: the road memory of the STC with its bus page, bank copy, lookup
// port and error check.
//
// The memory is 2^ROAD_AW 32-bit words (8 Mbytes at the default 21), split by
// byte-address bit 22 into bank 0 and bank 1 of equal size. Bank 1 is an exact
// copy of bank 0: a write to a bank-0 address stores the word in both banks, so
// only bank 0 needs to be downloaded (a write to a bank-1 address stores in
// bank 1 only). The host sees the memory through a 64-kbyte window: the full
// byte address is {road_pa, addr[15:0]}, road_pa being the ROAD-PA register.
//
// A road word holds the lower centroid number in bits 10:0, the upper in
// 21:11 and check bits in 31:22 (see road_ecc_enc). The lookup port reads the
// word named by a bank bit and the road address fields (sign, Pt bin, extended
// Pt, relative phi, relative sector, channel: byte-address bits 21:2), passes
// it through road_ecc_dec and returns the corrected centroid pair two clocks
// after lk_req. A corrected single error sets err_corr and a double error sets
// err_uncorr; both stay set until clr_flags (MISC-CSR command bit 1).
// The address layout, the bank copy and the check bits are the memory map's;
// the single lookup port, its latency and raw (uncorrected) bus reads are this
// design's choices. Bus reads have one clock of latency.
module road_mem
  import stc_pkg::*;
#(
  parameter int ROAD_AW = 21
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  input  logic [6:0]  road_pa,
  output logic [31:0] rdata,
  input  logic        lk_req,
  input  logic        lk_bank,
  input  road_addr_t  lk_addr,
  output logic        lk_valid,
  output logic [10:0] lk_lower,
  output logic [10:0] lk_upper,
  input  logic        clr_flags,
  output logic        err_corr,
  output logic        err_uncorr
);
  localparam int BW = ROAD_AW - 1;      // word-address width of one bank
  localparam int NB = 1 << BW;

  logic [31:0] bank0 [NB];
  logic [31:0] bank1 [NB];

  logic [22:0]   baddr;                 // byte address
  logic          bus_bank;
  logic [BW-1:0] bus_idx;
  assign baddr    = {road_pa, req.addr[15:0]};
  assign bus_bank = baddr[22];
  assign bus_idx  = baddr[2 +: BW];

  always_ff @(posedge clk) begin
    if (req.wr) begin
      if (!bus_bank) bank0[bus_idx] <= req.wdata;
      bank1[bus_idx] <= req.wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req.rd) rdata <= bus_bank ? bank1[bus_idx] : bank0[bus_idx];
  end

  // Lookup: stage 1 reads the word, stage 2 registers the checked result.
  logic [BW-1:0] lk_idx;
  logic [19:0]   lk_full;
  logic [31:0]   lk_word;
  logic          lk_v1;
  assign lk_full = lk_addr;
  assign lk_idx  = lk_full[BW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      lk_v1   <= 1'b0;
      lk_word <= '0;
    end else begin
      lk_v1 <= lk_req;
      if (lk_req) lk_word <= lk_bank ? bank1[lk_idx] : bank0[lk_idx];
    end
  end

  logic [21:0] fixed;
  logic        e_corr, e_unc;
  road_ecc_dec u_dec (.word_in(lk_word), .data_out(fixed),
                      .correctable(e_corr), .uncorrectable(e_unc));

  always_ff @(posedge clk) begin
    if (rst) begin
      lk_valid   <= 1'b0;
      lk_lower   <= '0;
      lk_upper   <= '0;
      err_corr   <= 1'b0;
      err_uncorr <= 1'b0;
    end else begin
      lk_valid <= lk_v1;
      if (lk_v1) begin
        lk_lower <= fixed[10:0];
        lk_upper <= fixed[21:11];
      end
      if (clr_flags) begin
        err_corr   <= 1'b0;
        err_uncorr <= 1'b0;
      end else if (lk_v1) begin
        err_corr   <= err_corr   | e_corr;
        err_uncorr <= err_uncorr | e_unc;
      end
    end
  end
endmodule
