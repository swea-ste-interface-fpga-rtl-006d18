// Testbench of timcntl at the specification's timing: 1 s ticks with an
// alternating seconds bit drive six 2 s cycles. Per cycle it counts STEPCLK
// (1345), SAMPLECLK (336), DOHSKP (16) and checks the interval lengths
// (1450 clocks, last 51200), SAMPLECNT, HSKPMD toggling, TESTCYCLECLK every
// fifth cycle and the 100 kHz reference period.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_timcntl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tk1s = 0, secs0 = 0;
  logic cyc, step, samp, test, hkmd, dohk, syn, synn;
  logic [8:0] scnt;
  timcntl dut (.clk, .rst, .tk1s, .secs0, .cycleclk(cyc), .stepclk(step), .sampleclk(samp),
               .samplecnt(scnt), .testcycleclk(test), .hskpmd(hkmd), .dohskp(dohk),
               .syn100k(syn), .syn100kn(synn));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 13_000_000)

  // 1 s tick generator
  initial begin
    repeat (5) @(negedge clk); rst = 0;
    for (int s = 1; s <= 13; s++) begin
      repeat (1_000_000 - 1) @(negedge clk);
      secs0 = s[0]; tk1s = 1; @(negedge clk); tk1s = 0;
    end
  end

  int ncyc = 0, nstep, nsamp, ndohk, ntest = 0, last_step, step_gap_bad, last_gap;
  int t = 0, last_syn_rise = -1, syn_bad = 0, hk_prev;
  logic syn_q = 0;
  always @(posedge clk) if (!rst) begin
    t++;
    if (syn && !syn_q) begin
      if (last_syn_rise >= 0 && t - last_syn_rise != 10) syn_bad++;
      last_syn_rise = t;
    end
    syn_q = syn;
    if (syn == synn) syn_bad++;
    if (cyc) begin
      if (ncyc > 0) begin
        `CHECK(nstep == 1345, $sformatf("STEPCLKs per cycle %0d", nstep))
        `CHECK(nsamp == 336, $sformatf("SAMPLECLKs per cycle %0d", nsamp))
        `CHECK(ndohk == 16, $sformatf("DOHSKPs per cycle %0d", ndohk))
        `CHECK(step_gap_bad == 0, "STEPCLK interval 1450 clocks")
        `CHECK(t - last_step == 51200, $sformatf("last interval %0d clocks", t - last_step))
        `CHECK(hkmd != hk_prev, "HSKPMD toggles at CYCLECLK")
      end
      `CHECK(step && samp && dohk, "STEPCLK, SAMPLECLK, DOHSKP start with CYCLECLK")
      `CHECK(test == (ncyc % 5 == 0), $sformatf("TESTCYCLECLK at cycle %0d", ncyc))
      ncyc++; nstep = 0; nsamp = 0; ndohk = 0; step_gap_bad = 0; hk_prev = hkmd;
    end
    if (test) ntest++;
    if (step) begin
      if (nstep > 0 && t - last_step != 1450) step_gap_bad++;
      last_step = t; nstep++;
    end
    if (samp) begin
      if (!cyc) `CHECK(scnt == 9'(nsamp), "SAMPLECNT counts SAMPLECLKs")
      nsamp++;
    end
    if (dohk) begin
      if (ndohk > 0 && t - last_gap != 125000) step_gap_bad++;
      last_gap = t; ndohk++;
    end
  end

  initial begin
    wait (ncyc == 6);
    @(posedge clk);
    `CHECK(ntest == 2, $sformatf("two TESTCYCLECLKs in six cycles, got %0d", ntest))
    `CHECK(syn_bad == 0, "SYN100K period 10 clocks, SYN100KN inverse")
    `TB_END
  end
endmodule
