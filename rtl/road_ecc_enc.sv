// road_ecc_enc: check-bit generator for one road-memory word.
//
// A road word holds two 11-bit centroid numbers, data(10:0) and data(21:11),
// and ten check bits data(31:22). Each half gets five check bits: four form a
// Hamming(15,11) code and the fifth is the overall parity, so one flipped bit
// per half can be corrected and two detected. Check bits data(22), data(24),
// data(27) and data(29) are stored inverted, which keeps an all-zero word from
// being a valid code word. The equations are the memory map's; they live in
// stc_pkg::ecc_half so the decoder recomputes exactly the same bits.
// Purely combinational.
module road_ecc_enc
  import stc_pkg::*;
(
  input  logic [21:0] data_in,   // {upper, lower} centroid numbers
  output logic [9:0]  check      // check[k] is data(22+k)
);
  always_comb begin
    check[4:0] = ecc_half(data_in[10:0]);
    check[9:5] = ecc_half(data_in[21:11]);
  end
endmodule
