// road_mem_tb: checks the road memory at a reduced size (ROAD_AW = 12, two
// banks of 2048 words).
//
// Words with correct check bits (computed here from the Hamming position
// table) are downloaded to bank 0 through the ROAD-PA page and must read back
// from both banks; a write to a bank-1 address must change bank 1 only. The
// lookup port must return the centroid pair two clocks after the request,
// correct one flipped bit with the correctable flag, raise the
// non-correctable flag on two flipped bits, and keep both flags until
// clr_flags.
module road_mem_tb;
  import stc_pkg::*;
  localparam int AW = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [6:0] road_pa;
  logic [31:0] rdata;
  logic lk_req, lk_bank, lk_valid, clr_flags, err_corr, err_uncorr;
  road_addr_t lk_addr;
  logic [10:0] lk_lower, lk_upper;
  road_mem #(.ROAD_AW(AW)) dut (.*);

  localparam int POS [11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};
  function automatic logic [4:0] ref_half(input logic [10:0] x);
    logic [4:0] r = '0;
    for (int i = 0; i < 11; i++) begin
      for (int k = 0; k < 4; k++) if (POS[i][k]) r[k] ^= x[i];
      if ($countones(POS[i]) % 2 == 0) r[4] ^= x[i];
    end
    return r ^ 5'b00101;
  endfunction
  function automatic logic [31:0] enc(input logic [21:0] x);
    return {ref_half(x[21:11]), ref_half(x[10:0]), x};
  endfunction

  logic [21:0] enc_in;
  logic [31:0] enc_out;
  always_comb enc_out = enc(enc_in);
  
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  // byte address inside the 8-Mbyte space
  task automatic mem_wr(input logic [22:0] ba, input logic [31:0] d);
    @(negedge clk); road_pa = ba[22:16]; req = '{rd: 1'b0, wr: 1'b1, addr: {2'b00, ba[15:0]}, wdata: d};
    @(negedge clk); req = BUS_IDLE;
  endtask
  task automatic mem_rd(input logic [22:0] ba, output logic [31:0] d);
    @(negedge clk); road_pa = ba[22:16]; req = '{rd: 1'b1, wr: 1'b0, addr: {2'b00, ba[15:0]}, wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask
  task automatic lookup(input logic bank, input logic [19:0] a, output logic [21:0] d, output int lat);
    @(negedge clk); lk_req = 1; lk_bank = bank; lk_addr = road_addr_t'(a);
    lat = 0;
    @(negedge clk); lk_req = 0;
    while (!lk_valid && lat < 10) begin lat++; @(negedge clk); end
    lat++;
    d = {lk_upper, lk_lower};
  endtask

  task automatic encode(input logic [21:0] v, output logic [31:0] e);
    enc_in = v; #1; e = enc_out;
  endtask

  localparam int NB = 1 << (AW - 1);
  logic [21:0] img [NB];
  logic [31:0] eimg [NB];
  logic [31:0] e155;
  int n_corr, n_unc;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] d;
    logic [21:0] c;
    int lat;
    req = BUS_IDLE; road_pa = 0; lk_req = 0; lk_bank = 0; lk_addr = '0; clr_flags = 0; rst = 1;
    n_corr = 0; n_unc = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < NB; i++) begin
      img[i] = 22'($urandom);
      encode(img[i], eimg[i]);
      mem_wr(23'(i * 4), eimg[i]);
    end
    for (int i = 0; i < NB; i += 37) begin
      mem_rd(23'(i * 4), d);            chk(d == eimg[i], $sformatf("bank0 word %0d", i));
      mem_rd(23'h40_0000 | 23'(i * 4), d); chk(d == eimg[i], $sformatf("bank1 copy %0d", i));
    end
    // write to bank 1 only
    encode(22'h155555, e155);
    mem_wr(23'h40_0000 | 23'(5 * 4), e155);
    mem_rd(23'(5 * 4), d);                 chk(d == eimg[5], "bank0 untouched by bank1 write");
    mem_rd(23'h40_0000 | 23'(5 * 4), d);   chk(d == e155, "bank1 written");
    // clean lookups in bank 0
    for (int n = 0; n < 50; n++) begin
      int i;
      i = $urandom_range(NB - 1);
      lookup(1'b0, 20'(i), c, lat);
      chk(c == img[i] && lat == 2, $sformatf("lookup %0d got %h lat %0d", i, c, lat));
    end
    lookup(1'b1, 20'd5, c, lat); chk(c == 22'h155555, "lookup bank 1");
    chk(!err_corr && !err_uncorr, "no flags on clean words");
    // single-bit error
    mem_wr(23'(7 * 4), eimg[7] ^ 32'h0000_0400);
    lookup(1'b0, 20'd7, c, lat);
    chk(c == img[7] && err_corr && !err_uncorr, "single error corrected and flagged");
    if (err_corr) n_corr++;
    // check-bit error in the upper half
    mem_wr(23'(8 * 4), eimg[8] ^ 32'h8000_0000);
    lookup(1'b0, 20'd8, c, lat);
    chk(c == img[8], "check-bit error leaves data");
    // double error
    mem_wr(23'(9 * 4), eimg[9] ^ 32'h0000_0003);
    lookup(1'b0, 20'd9, c, lat);
    chk(err_uncorr, "double error flagged");
    if (err_uncorr) n_unc++;
    // flags sticky until cleared
    lookup(1'b0, 20'd10, c, lat);
    chk(err_corr && err_uncorr, "flags sticky");
    @(negedge clk); clr_flags = 1; @(negedge clk); clr_flags = 0;
    chk(!err_corr && !err_uncorr, "flags cleared");
    $display("corrected=%0d uncorrectable=%0d", n_corr, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
