// Testbench of stetestpulse, shortened to a 4-bit DAC and 24-clock steps
// with 4-clock pulses: after TESTCYCLECLK every step must show one low pulse
// of PULSE_CLKS, followed by a two-byte DAC write of the next ramp value and
// a latch; after the maximum the DAC returns to 0, pulses stop, and the next
// TESTCYCLECLK restarts the ramp.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_stetestpulse;
  localparam int STEP = 24, PW = 4, BITS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, tcc = 0, wrdn = 0, rq, bsel, dlat, tp;
  logic [7:0] dd;
  stetestpulse #(.STEP_CLKS(STEP), .PULSE_CLKS(PW), .DAC_BITS(BITS)) dut (
    .clk, .rst, .enbstetp(en), .testcycleclk(tcc), .dacwrdn(wrdn), .dacwrrq(rq),
    .dacbytesel(bsel), .dacdat(dd), .daclat(dlat), .testpulse_n(tp));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  // DAC model: grants each byte one cycle after the request, latches on DACLAT
  logic [15:0] hold, dac;
  int nlat = 0, npulse = 0, lowlen = 0, bad_w = 0, last_fall = -1, bad_p = 0, t = 0;
  logic [15:0] vals [$];
  always @(posedge clk) if (!rst) begin
    t++;
    wrdn <= rq && !wrdn;
    if (rq && wrdn) begin
      if (bsel) hold[15:8] = dd; else hold[7:0] = dd;
    end
    if (dlat) begin dac = hold; nlat++; vals.push_back(hold); end
    if (!tp) lowlen++;
    else if (lowlen != 0) begin
      if (lowlen != PW) bad_w++;
      lowlen = 0;
    end
    if (!tp && lowlen == 1) begin
      if (last_fall >= 0 && t - last_fall != STEP) bad_p++;
      last_fall = t; npulse++;
    end
  end
  initial begin
    hold = 0; dac = 0;
    repeat (3) @(negedge clk); rst = 0; en = 1;
    for (int run = 0; run < 2; run++) begin
      vals.delete(); npulse = 0; last_fall = -1;
      @(negedge clk); tcc = 1; @(negedge clk); tcc = 0;
      repeat (STEP * (1 << BITS) + 3 * STEP) @(negedge clk);
      `CHECK(npulse == (1 << BITS), $sformatf("pulses per ramp %0d", npulse))
      `CHECK(bad_w == 0, "pulse width PULSE_CLKS")
      `CHECK(bad_p == 0, "pulse spacing STEP_CLKS")
      `CHECK(vals.size() == (1 << BITS), $sformatf("DAC latches %0d", vals.size()))
      for (int i = 0; i < vals.size(); i++)
        `CHECK(vals[i] == 16'((i + 1) % (1 << BITS)), $sformatf("ramp value %0d = %0d", i, vals[i]))
      `CHECK(dac == 0 && tp, "DAC back at zero and pulses stopped")
    end
    en = 0; @(negedge clk); @(negedge clk);
    `CHECK(tp, "inactive (high) when disabled")
    `TB_END
  end
endmodule
