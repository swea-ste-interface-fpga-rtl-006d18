// Testbench of evproc: four shaper/ADC chain models fire random peaks, the
// housekeeping side requests the bus now and then, and an SRAM model holds
// the energy LUT (bin = a hash of chain and ADC value) and the accumulator.
// Every accepted event (ADCSOC seen) must be counted once in the right bin;
// peaks above ULD or on a disabled chain must never start a conversion;
// with all chains busy each chain gets about a quarter of the events; every
// housekeeping request is answered with one read strobe.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_evproc;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] chenb = 4'b1111, peak = 0, lld = 0, uld = 0, busy = 0, soc, rd, prst;
  logic [11:0] adcdat;
  logic hrq = 0, hrd, mrq, mwr, mdn;
  logic [15:0] madr;
  logic [7:0] mdo, mdi;
  evproc dut (.clk, .rst, .chenb, .peak, .lld, .uld, .adcbusy(busy), .adcsoc(soc), .adcread(rd),
              .pulserst(prst), .adcdat, .hadcrdrq(hrq), .hadcrd(hrd), .memrq(mrq), .memwr(mwr),
              .memadr(madr), .memdatout(mdo), .memdn(mdn), .memdatin(mdi));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  function automatic logic [7:0] lut(logic [1:0] ch, logic [11:0] a); return 8'(a ^ (ch * 8'd61)); endfunction
  logic [15:0] acc [256];
  int expect_bin [256];
  int accepted [4], bad_soc = 0, hreq = 0, hgr = 0;
  logic [11:0] conv [4];
  int bleft [4];
  int mwait = 0;

  assign mdn = mrq && mwait == 0;
  assign mdi = madr[15] ? (madr[0] ? acc[madr[8:1]][7:0] : acc[madr[8:1]][15:8]) : lut(madr[13:12], madr[11:0]);
  always_comb begin
    adcdat = 12'h000;
    for (int i = 0; i < 4; i++) if (rd[i]) adcdat = conv[i];
  end

  always @(posedge clk) if (!rst) begin
    if (mrq) mwait <= (mwait == 0) ? $urandom_range(0, 2) : mwait - 1;
    if (mrq && mdn && mwr) begin
      if (madr[0]) acc[madr[8:1]][7:0] <= mdo; else acc[madr[8:1]][15:8] <= mdo;
    end
    for (int i = 0; i < 4; i++) begin
      // ADC model: busy rises the cycle after SOC, lasts a few cycles
      if (soc[i] && !busy[i]) begin
        if (uld[i] || !chenb[i] || !lld[i]) bad_soc++;
        busy[i] <= 1; bleft[i] <= $urandom_range(2, 6);
        conv[i] <= 12'($urandom); accepted[i]++;
      end else if (busy[i]) begin
        if (bleft[i] == 0) begin
          busy[i] <= 0; expect_bin[lut(2'(i), conv[i])]++;
        end else bleft[i] <= bleft[i] - 1;
      end
      // shaper model: random peaks, sometimes above ULD
      if (peak[i]) peak[i] <= 0;
      else if ($urandom_range(0, 9) == 0) begin
        peak[i] <= 1; lld[i] <= ($urandom_range(0, 7) != 0); uld[i] <= ($urandom_range(0, 7) == 0);
      end
    end
    if (hrq && hrd) begin hrq <= 0; hgr++; end
    else if (!hrq && $urandom_range(0, 199) == 0) begin hrq <= 1; hreq++; end
  end

  initial begin
    for (int b = 0; b < 256; b++) begin acc[b] = 0; expect_bin[b] = 0; end
    for (int i = 0; i < 4; i++) begin accepted[i] = 0; conv[i] = 0; bleft[i] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    repeat (60000) @(negedge clk);
    chenb = 4'b1011;
    begin
      automatic int n_before = accepted[2];
      repeat (5000) @(negedge clk);
      `CHECK(accepted[2] == n_before, "disabled chain never converts")
    end
    chenb = 0; repeat (200) @(negedge clk);
    `CHECK(bad_soc == 0, "ADCSOC only for qualified peaks")
    for (int b = 0; b < 256; b++)
      `CHECK(acc[b] == 16'(expect_bin[b]), $sformatf("bin %0d: %0d vs %0d", b, acc[b], expect_bin[b]))
    for (int i = 0; i < 4; i++)
      `CHECK(accepted[i] > 1000, $sformatf("chain %0d events %0d", i, accepted[i]))
    `CHECK(hgr == hreq && hgr > 100, $sformatf("housekeeping reads %0d of %0d", hgr, hreq))
    `TB_END
  end
endmodule
