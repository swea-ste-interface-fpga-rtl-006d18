// Testbench of hskpr: an ADC model converts the selected channel (result =
// channel * 4096 + conversion number) with a random busy time and a bus
// model grants read requests after random delays. CYCLING mode must scan
// channels 0..15 on the 16 DOHSKP ticks with one HKPGDN each; SWEEP mode must
// convert the commanded channel at every SAMPLECLK and give HKPGDN on DOHSKP.
// DHKPG must carry the status inputs in the specified bit positions.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_hskpr;
  import sif_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, lat = 0, pe = 0, pwr = 1, shdn = 0, swst = 0, md = 0, dohk = 0, samp = 0, cyc = 0;
  logic [1:0] cvsw = 0, cvst = 0;
  logic [15:0] cd = 0, hdat, ahk, dhk;
  logic soc, busy = 0, rrq, rd = 0, dn;
  logic [3:0] amux;
  hskpr dut (.clk, .rst, .hkps_cmdlat(lat), .cmd_dat(cd), .cmdpe(pe), .afepwr(pwr), .afeshdn(shdn),
             .sweacovstat(swst), .stecovsw(cvsw), .stecovstat(cvst), .hskpmd(md), .dohskp(dohk),
             .sampleclk(samp), .cycleclk(cyc), .hadcsoc(soc), .hadcbusy(busy), .hadcrdrq(rrq),
             .hadcrd(rd), .hadcdat(hdat), .amuxsel(amux), .ahkpg(ahk), .dhkpg(dhk), .hkpgdn(dn));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  int nconv = 0, ndn = 0, bl = 0, gw = 0;
  logic [15:0] res;
  assign hdat = rd ? res : 16'h0;
  always @(posedge clk) if (!rst) begin
    if (soc && !busy) begin busy <= 1; bl <= $urandom_range(2, 8); res <= {amux, 12'(nconv)}; end
    else if (busy) begin if (bl == 0) begin busy <= 0; nconv++; end else bl <= bl - 1; end
    rd <= 0;
    if (rrq && !rd) begin if (gw == 0) begin rd <= 1; gw <= $urandom_range(0, 4); end else gw <= gw - 1; end
    if (dn) ndn++;
  end
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // CYCLING cycle
    md = HK_CYCLING; @(negedge clk); cyc = 1; dohk = 1; @(negedge clk); cyc = 0; dohk = 0;
    for (int k = 0; k < 16; k++) begin
      repeat (40) @(negedge clk);
      `CHECK(ahk[15:12] == 4'(k) && dhk[15:12] == 4'(k), $sformatf("cycling conversion %0d channel", k))
      `CHECK(ndn == k + 1, "one HKPGDN per DOHSKP in cycling mode")
      if (k < 15) pulse(dohk);
    end
    // SWEEP cycle on channel 9
    @(negedge clk); cd = 16'hFFF9; lat = 1; @(negedge clk); lat = 0;
    md = HK_SWEEP; ndn = 0; nconv = 0;
    @(negedge clk); cyc = 1; @(negedge clk); cyc = 0;
    `CHECK(amux == 4'd9, "sweep channel applied at CYCLECLK")
    for (int k = 0; k < 12; k++) begin
      pulse(samp); repeat (40) @(negedge clk);
      `CHECK(ahk == {4'd9, 12'(k)}, $sformatf("sweep conversion %0d", k))
      `CHECK(amux == 4'd9, "channel not incremented in sweep mode")
    end
    `CHECK(ndn == 0, "no HKPGDN without DOHSKP in sweep mode")
    pulse(dohk); pulse(dohk); @(negedge clk);
    `CHECK(ndn == 2, "HKPGDN on DOHSKP in sweep mode")
    // digital housekeeping word
    pe = 1; pwr = 0; shdn = 1; swst = 1; cvst = 2'b10; cvsw = 2'b01; #1;
    `CHECK(dhk == {4'd9, 1'b1, 3'b000, 2'b01, 2'b10, 1'b1, 1'b1, 1'b0, 1'b1}, "DHKPG layout")
    `TB_END
  end
endmodule
