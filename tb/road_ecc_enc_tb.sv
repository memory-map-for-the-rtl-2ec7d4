// road_ecc_enc_tb: checks the road-memory check-bit generator.
//
// The reference builds each check bit from a table of Hamming positions: data
// bit i of a half sits at position POS[i] (3,5,6,7,9,...,15); check bit k<4
// is the parity of the data bits whose position has bit k set, check bit 4 is
// the parity of those whose position has an even number of ones, and check
// bits 0 and 2 are inverted. All 2048 values of each half are tried, with
// random values in the other half, and the result must also satisfy the
// equations of the memory map written out as bit masks.
module road_ecc_enc_tb;
  int checks = 0, failures = 0;
  logic [21:0] d;
  logic [9:0]  c;
  road_ecc_enc dut (.data_in(d), .check(c));

  localparam int POS [11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};

  function automatic logic [4:0] ref_half(input logic [10:0] x);
    logic [4:0] r = '0;
    for (int i = 0; i < 11; i++) begin
      for (int k = 0; k < 4; k++) if (POS[i][k]) r[k] ^= x[i];
      if ($countones(POS[i]) % 2 == 0) r[4] ^= x[i];
    end
    return r ^ 5'b00101;
  endfunction

  // Masks read off the printed equations, lower half.
  localparam logic [10:0] M [5] = '{11'b10101011011, 11'b11001101101, 11'b11110001110,
                                    11'b11111110000, 11'b10010110111};
  function automatic logic [4:0] mask_half(input logic [10:0] x);
    logic [4:0] r;
    for (int k = 0; k < 5; k++) r[k] = ^(x & M[k]);
    return r ^ 5'b00101;
  endfunction

  // references evaluated outside the stimulus process
  logic [4:0] r_lo, r_hi, m_lo, m_hi;
  always_comb begin
    r_lo = ref_half(d[10:0]);
    r_hi = ref_half(d[21:11]);
    m_lo = mask_half(d[10:0]);
    m_hi = mask_half(d[21:11]);
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 2; h++) begin
      for (int v = 0; v < 2048; v++) begin
        logic [10:0] other;
        other = 11'($urandom);
        d = (h == 0) ? {other, 11'(v)} : {11'(v), other};
        #1;
        checks++;
        if (c[4:0] != r_lo || c[9:5] != r_hi || c[4:0] != m_lo || c[9:5] != m_hi) begin
          failures++;
          if (failures < 5) $display("mismatch d=%h c=%h", d, c);
        end
      end
    end
    // all-zero data must not give all-zero check bits (inverted bits 22,24,27,29)
    d = '0; #1; checks++;
    if (c != 10'b0010100101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
