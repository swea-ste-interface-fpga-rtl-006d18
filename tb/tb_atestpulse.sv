// Testbench of atestpulse: after CYCLECLK the half period is 1 clock and
// grows by one clock with every SAMPLECLK; the output stays low while either
// enable is off.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_atestpulse;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, entp = 0, cyc = 0, samp = 0, tp;
  atestpulse dut (.clk, .rst, .enbswea(en), .enbsweatp(entp), .cycleclk(cyc), .sampleclk(samp), .testpulse(tp));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  // measures the length of the next complete high phase
  task automatic half(output int n);
    n = 0;
    while (tp !== 1'b0) @(negedge clk);
    while (tp !== 1'b1) @(negedge clk);
    while (tp === 1'b1) begin n++; @(negedge clk); end
  endtask
  initial begin
    int h;
    repeat (3) @(negedge clk); rst = 0;
    en = 1; repeat (20) begin @(negedge clk); `CHECK(tp == 0, "low while test pulser disabled") end
    entp = 1; en = 0; repeat (20) begin @(negedge clk); `CHECK(tp == 0, "low while SWEA disabled") end
    en = 1;
    for (int cycle = 0; cycle < 2; cycle++) begin
      pulse(cyc);
      for (int s = 0; s < 12; s++) begin
        half(h); `CHECK(h == s + 1, $sformatf("half period %0d after %0d SAMPLECLKs", h, s))
        half(h); `CHECK(h == s + 1, "stable between SAMPLECLKs")
        pulse(samp);
      end
    end
    entp = 0; @(negedge clk); @(negedge clk); `CHECK(tp == 0, "disable forces low")
    `TB_END
  end
endmodule
