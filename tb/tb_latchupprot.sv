// Testbench of latchupprot: walks the eight input combinations of the
// power-control truth table and checks reset holds AFEPWR low.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_latchupprot;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shdn = 0, fon = 0, foff = 0, pwr;
  latchupprot dut (.clk, .rst, .afeshdn(shdn), .afepwr_fon(fon), .afepwr_foff(foff), .afepwr(pwr));
  always #500 clk = ~clk;
  `WATCHDOG(clk, 1000)
  // expected truth table indexed by {shdn, foff, fon}
  localparam bit EXP [8] = '{1, 1, 0, 0, 0, 1, 0, 0};
  initial begin
    repeat (3) @(posedge clk);
    #1 `CHECK(pwr == 0, "AFEPWR low in reset")
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 8; v++) begin
        @(negedge clk); rst = 0; {shdn, foff, fon} = 3'(v);
        @(posedge clk); #1;
        `CHECK(pwr == EXP[v], $sformatf("truth table row %0d", v))
      end
    @(negedge clk); rst = 1; {shdn, foff, fon} = 3'b000; @(posedge clk); #1;
    `CHECK(pwr == 0, "reset jams AFEPWR low")
    `TB_END
  end
endmodule
