// Check counters and a comparison macro shared by the testbenches (the
// result line and watchdog are this verification environment's convention).
// A testbench declares `int checks, failures;` and uses `CHECK(cond, msg).
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end
`define TB_END \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog expired"); `TB_END end
