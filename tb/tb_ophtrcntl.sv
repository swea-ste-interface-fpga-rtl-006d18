// Testbench of ophtrcntl: loads every PWM value 0..15 and measures the high
// time over a whole 10-cycle period; illegal values must give 0 %.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_ophtrcntl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, lat = 0, out;
  logic [15:0] dat = '0;
  ophtrcntl dut (.clk, .rst, .cmd_lat(lat), .cmd_dat(dat), .pulse_out(out));
  always #500 clk = ~clk;
  `WATCHDOG(clk, 5000)
  initial begin
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    for (int v = 0; v < 16; v++) begin
      int high, exp, period_ok;
      @(negedge clk); dat = 16'hABC0 | 16'(v); lat = 1; @(negedge clk); lat = 0;
      repeat (25) @(negedge clk);         // let the new value settle in
      high = 0;
      for (int c = 0; c < 10; c++) begin @(negedge clk); high += out; end
      exp = (v > 10) ? 0 : v;
      `CHECK(high == exp, $sformatf("PWM value %0d: high %0d of 10", v, high))
      // same count over the next period: the period is exactly 10 cycles
      period_ok = 0;
      for (int c = 0; c < 10; c++) begin @(negedge clk); period_ok += out; end
      `CHECK(period_ok == exp, $sformatf("PWM value %0d repeats every 10 us", v))
    end
    `TB_END
  end
endmodule
