// road_ecc_dec_tb: checks correction and error flags of the road-word check.
//
// Words are built with road_ecc_enc's check bits computed here independently
// (Hamming positions table). For random words: no flipped bit must give the
// data back with no flag; any one flipped bit (all 32 positions) must be
// corrected with the correctable flag; two flipped bits in the same half must
// raise the uncorrectable flag.
module road_ecc_dec_tb;
  int checks = 0, failures = 0;
  logic [31:0] w;
  logic [21:0] d;
  logic        corr, unc;
  road_ecc_dec dut (.word_in(w), .data_out(d), .correctable(corr), .uncorrectable(unc));

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

  logic [21:0] x;
  logic [31:0] clean;
  always_comb clean = enc(x);

  task automatic expect_ok(input logic [21:0] want, input logic wc, input logic wu, input string what);
    #1;
    checks++;
    if (d !== want && !wu || corr !== wc || unc !== wu) begin
      failures++;
      if (failures < 8) $display("%s: w=%h d=%h want=%h corr=%b unc=%b", what, w, d, want, corr, unc);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      x = 22'($urandom);
      #1;
      w = clean;
      expect_ok(x, 1'b0, 1'b0, "clean");
      for (int b = 0; b < 32; b++) begin
        w = clean ^ (32'd1 << b);
        expect_ok(x, 1'b1, 1'b0, "single");
      end
      begin
        int a, b;
        // two bits inside the lower half (data 10:0 or check 26:22)
        int lo [16];
        lo = '{0,1,2,3,4,5,6,7,8,9,10,22,23,24,25,26};
        a = lo[$urandom_range(15)];
        do b = lo[$urandom_range(15)]; while (b == a);
        w = clean ^ (32'd1 << a) ^ (32'd1 << b);
        expect_ok(x, 1'b0, 1'b1, "double");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
