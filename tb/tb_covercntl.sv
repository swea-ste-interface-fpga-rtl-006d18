// Testbench of covercntl: SWEA cover follows its command; an STE open or
// close command powers the switch until the status input reports the
// position, a cleared command drops it at once, force ignores the status and
// two directions at once drive neither.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_covercntl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, swon = 0, swsw;
  logic [1:0] on = 0, fon = 0, stat = 0, sw;
  covercntl dut (.clk, .rst, .sweacovon(swon), .stecovon(on), .forstecovon(fon),
                 .stecovstat(stat), .sweacovsw(swsw), .stecovsw(sw));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  task automatic step(int n = 1); repeat (n) @(negedge clk); endtask
  initial begin
    step(3); rst = 0; step();
    `CHECK(!swsw && sw == 0, "all off after reset")
    swon = 1; step(); `CHECK(swsw, "SWEA cover switch on")
    swon = 0; step(); `CHECK(!swsw, "SWEA cover switch off")
    for (int d = 0; d < 2; d++) begin
      on[d] = 1; step(2); `CHECK(sw == 2'(1 << d), $sformatf("STE dir %0d powered", d))
      step(20);           `CHECK(sw == 2'(1 << d), "stays on until status")
      stat[d] = 1; step(2); `CHECK(sw == 0, "status reached turns switch off")
      stat[d] = 0; step(3); `CHECK(sw == 0, "no restart without new command")
      on[d] = 0; step(); on[d] = 1; step(2); `CHECK(sw == 2'(1 << d), "new command restarts")
      on[d] = 0; step(2); `CHECK(sw == 0, "command with bit cleared drops at once")
      stat[d] = 1; fon[d] = 1; step(2); `CHECK(sw == 2'(1 << d), "force ignores status")
      fon[d] = 0; stat[d] = 0; step(2); `CHECK(sw == 0, "force released")
    end
    fon = 2'b11; step(2); `CHECK(sw == 0, "both directions: neither driven")
    fon = 0; on = 2'b11; step(2); `CHECK(sw == 0, "both commands: neither driven")
    `TB_END
  end
endmodule
