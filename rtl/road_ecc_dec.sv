// road_ecc_dec: single-error-correcting, double-error-detecting check of a
// road-memory word.
//
// Each 11-bit half is checked on its own. The stored check bits are compared
// with bits recomputed by road_ecc_enc; the two inverted check bits are
// un-inverted first. Check bits 0..3 give a Hamming syndrome that names the
// position (1..15) of a single flipped bit; data bits d0..d10 sit at positions
// 3,5,6,7,9,10,11,12,13,14,15, as the memory map's equations imply. The fifth
// bit completes an overall parity over all 16 bits of the half:
//   parity odd               -> one error, corrected (or in a check bit)
//   parity even, syndrome!=0 -> two errors, not correctable
// The check-bit equations are the memory map's; the decoder structure is the
// standard one for such a code and is this design's own. Combinational.
module road_ecc_dec
  import stc_pkg::*;
(
  input  logic [31:0] word_in,
  output logic [21:0] data_out,
  output logic        correctable,    // at least one half had one error
  output logic        uncorrectable   // at least one half had two errors
);
  logic [9:0] recomputed;
  road_ecc_enc u_enc (.data_in(word_in[21:0]), .check(recomputed));

  // Index of the data bit at Hamming position p, or -1 for a check-bit position.
  function automatic int data_index(input logic [3:0] p);
    case (p)
      4'd3:  return 0;   4'd5:  return 1;   4'd6:  return 2;   4'd7:  return 3;
      4'd9:  return 4;   4'd10: return 5;   4'd11: return 6;   4'd12: return 7;
      4'd13: return 8;   4'd14: return 9;   4'd15: return 10;
      default: return -1;
    endcase
  endfunction

  logic [1:0] corr_h, unc_h;

  always_comb begin
    data_out = word_in[21:0];
    for (int h = 0; h < 2; h++) begin
      logic [10:0] d;
      logic [4:0]  stored, plain;
      logic [3:0]  syn;
      logic        ovp;
      int          idx;
      d      = word_in[h*11 +: 11];
      stored = word_in[22 + h*5 +: 5];
      syn    = stored[3:0] ^ recomputed[h*5 +: 4];
      plain  = stored ^ 5'b00101;            // undo the inversion of check bits 0 and 2
      ovp    = (^d) ^ (^plain);
      idx    = data_index(syn);
      corr_h[h] = ovp;
      unc_h[h]  = !ovp && (syn != 4'd0);
      if (ovp && idx >= 0) d[idx] = ~d[idx];
      data_out[h*11 +: 11] = d;
    end
    correctable   = |corr_h;
    uncorrectable = |unc_h;
  end
endmodule
