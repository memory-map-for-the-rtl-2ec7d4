// chan_misc_tb: checks the miscellaneous parameter space of a channel.
//
// Writes random values to every pulse-area, data-type, threshold and SEQ/HDI
// address and reads each back, expecting the value in the low bits and the
// mirror copy in the upper bits (23:16 or 18:16), the Z/stereo bit in bit 15
// of data-type reads and 0 in unused words. Then checks the data-path side:
// mirror outputs, data-type lookup with and without accept-bad-chip, and the
// pulse-area code against a count of reached thresholds for random energies.
module chan_misc_tb;
  import stc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  bus_req_t req;
  logic [31:0] rdata;
  logic accept_bad_chip;
  logic [3:0] dt_chip;
  data_type_e dt_type;
  logic dt_discard;
  logic [10:0] pa_energy;
  logic pa_axial;
  logic [2:0] pa_code;
  thresholds_t thr;
  logic [7:0] seq_id;
  logic [2:0] hdi_id;
  logic z_not_stereo;

  chan_misc dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [12:0] a, input logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: 18'(a), wdata: d};
    @(negedge clk); req = BUS_IDLE;
  endtask
  task automatic bus_rd(input logic [12:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: 18'(a), wdata: '0};
    @(negedge clk); req = BUS_IDLE; d = rdata;
  endtask

  logic [10:0] pa [2][7];
  logic [1:0]  dt [16];
  logic [7:0]  th [6];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    req = BUS_IDLE; accept_bad_chip = 0; dt_chip = 0; pa_energy = 0; pa_axial = 0; rst = 1;
    repeat (3) @(negedge clk); rst = 0;
    // pulse-area thresholds, ascending with random steps
    for (int s = 0; s < 2; s++) begin
      int v;
      v = 0;
      for (int k = 0; k < 7; k++) begin
        v += 1 + $urandom_range(250);
        pa[s][k] = 11'(v);
        bus_wr(13'h1A04 + 13'(32*s) + 13'(4*k), 32'hFFFF_F800 | 32'(v));
      end
    end
    // data types: chip 0..8 random legal, 9..15 left illegal; last legal write is stereo
    for (int k = 0; k < 16; k++) begin
      dt[k] = (k < 9) ? 2'($urandom_range(1, 3)) : 2'b00;
      if (k == 8) dt[k] = 2'b01;
      bus_wr(13'h1A40 + 13'(4*k), {30'h3FFF_FFFF, dt[k]});
    end
    for (int k = 0; k < 6; k++) begin
      th[k] = 8'($urandom);
      bus_wr(13'h1A88 + 13'(4*k), {24'hFFFFFF, th[k]});
    end
    bus_wr(13'h1AA0, 32'hFFFF_FFF5);   // HDI 5
    bus_wr(13'h1AA4, 32'hFFFF_FF9C);   // SEQ 0x9C

    for (int s = 0; s < 2; s++) begin
      bus_rd(13'h1A00 + 13'(32*s), d); chk(d == 0, "pulse-area unused word");
      for (int k = 0; k < 7; k++) begin
        bus_rd(13'h1A04 + 13'(32*s) + 13'(4*k), d);
        chk(d == 32'(pa[s][k]), $sformatf("pulse area %0d/%0d read %h", s, k, d));
      end
    end
    for (int k = 0; k < 16; k++) begin
      bus_rd(13'h1A40 + 13'(4*k), d);
      chk(d == 32'(dt[k]), $sformatf("data type %0d read %h", k, d));  // Z/stereo bit 0: stereo written last
    end
    bus_rd(13'h1A80, d); chk(d == 0, "threshold unused 0x1A80");
    bus_rd(13'h1A84, d); chk(d == 0, "threshold unused 0x1A84");
    for (int k = 0; k < 6; k++) begin
      bus_rd(13'h1A88 + 13'(4*k), d);
      chk(d == {8'd0, th[k], 8'd0, th[k]}, $sformatf("threshold %0d read %h", k, d));
    end
    bus_rd(13'h1AA0, d); chk(d == 32'h0005_0005, $sformatf("HDI read %h", d));
    bus_rd(13'h1AA4, d); chk(d == 32'h009C_009C, $sformatf("SEQ read %h", d));
    chk(seq_id == 8'h9C && hdi_id == 3'd5, "seq/hdi mirror outputs");
    chk(thr == {th[0], th[1], th[2], th[3], th[4], th[5]}, "threshold outputs");

    // Z/stereo bit: set by writing Z, visible in bit 15
    chk(!z_not_stereo, "z bit clear after stereo");
    bus_wr(13'h1A40, 32'h3); dt[0] = 2'b11;
    bus_rd(13'h1A44, d);
    chk(z_not_stereo && d == {16'd0, 1'b1, 13'd0, dt[1]}, $sformatf("z bit set, read %h", d));

    // data-type lookups
    for (int ab = 0; ab < 2; ab++) begin
      accept_bad_chip = 1'(ab);
      for (int k = 0; k < 16; k++) begin
        dt_chip = 4'(k); #1;
        chk(dt_type == data_type_e'(dt[k]) && dt_discard == (dt[k] == 2'b00 && ab == 0),
            $sformatf("dt lookup chip %0d ab %0d", k, ab));
      end
    end
    // pulse area
    for (int n = 0; n < 400; n++) begin
      int cnt;
      cnt = 0;
      pa_axial = 1'($urandom);
      pa_energy = 11'($urandom_range(0, 2047));
      if (n % 4 == 0) pa_energy = pa[pa_axial ? 0 : 1][n % 7];   // exactly on a threshold
      #1;
      for (int k = 0; k < 7; k++) if (pa_energy >= pa[pa_axial ? 0 : 1][k]) cnt++;
      chk(pa_code == 3'(cnt), $sformatf("pulse area e=%0d axial=%0d code=%0d want %0d", pa_energy, pa_axial, pa_code, cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
