// Testbench of acounters: random numbers of short anode pulses per channel
// between SAMPLECLKs must appear in the holding registers after SAMPLECLK,
// the counters must restart from zero, a channel with more than 16383 pulses
// must stop at 16383, and ENBSWEA low must hold everything at zero.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_acounters;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, samp = 0;
  logic [15:0] ap = 0;
  logic [13:0] lat [16];
  acounters dut (.clk, .rst, .enbswea(en), .sampleclk(samp), .apulse(ap), .latcnt(lat));
  always #500 clk = ~clk;          // 1000 time units per clock, pulses of 250
  `WATCHDOG(clk, 100000)
  int n [16];
  task automatic sample();
    @(negedge clk); samp = 1; @(negedge clk); samp = 0; @(negedge clk); @(negedge clk);
  endtask
  // one pulse of 250 ns on every channel whose count is not yet reached
  task automatic pulses(int rounds);
    for (int r = 0; r < rounds; r++) begin
      logic [15:0] m;
      for (int c = 0; c < 16; c++) m[c] = (r < n[c]);
      #37 ap = m; #250 ap = 0; #13;
    end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int c = 0; c < 16; c++) n[c] = 5;
    pulses(5); sample();
    for (int c = 0; c < 16; c++) `CHECK(lat[c] == 0, "held at zero while ENBSWEA is low")
    en = 1; sample();
    for (int k = 0; k < 8; k++) begin
      int mx = 0;
      for (int c = 0; c < 16; c++) begin n[c] = $urandom_range(0, 300); if (n[c] > mx) mx = n[c]; end
      @(negedge clk); #5; pulses(mx); sample();
      for (int c = 0; c < 16; c++)
        `CHECK(lat[c] == 14'(n[c]), $sformatf("sample %0d ch %0d: %0d vs %0d", k, c, lat[c], n[c]))
    end
    for (int c = 0; c < 16; c++) n[c] = (c == 3) ? 16500 : 0;
    @(negedge clk); #5; pulses(16500); sample();
    `CHECK(lat[3] == 14'h3FFF, "counter stops at its maximum")
    `CHECK(lat[4] == 0, "other channels zero")
    sample();
    `CHECK(lat[3] == 0, "cleared after the transfer")
    `TB_END
  end
endmodule
