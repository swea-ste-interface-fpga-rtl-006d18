// Testbench of tdacs: random threshold loads must appear on the selected
// output only at the next CYCLECLK; reset clears all four.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_tdacs;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, lat = 0, cyc = 0;
  logic [15:0] dat = '0;
  logic [5:0] q [4];
  logic [5:0] exp [4], stg [4];
  tdacs dut (.clk, .rst, .tdac_cmdlat(lat), .cmd_dat(dat), .cycleclk(cyc), .tdac(q));
  always #500 clk = ~clk;
  `WATCHDOG(clk, 10000)
  initial begin
    for (int i = 0; i < 4; i++) begin exp[i] = 0; stg[i] = 0; end
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 4; i++) `CHECK(q[i] == 0, "reset value zero")
    repeat (40) begin
      automatic int n = $urandom_range(1, 3);
      repeat (n) begin
        @(negedge clk); dat = 16'($urandom); lat = 1; stg[dat[7:6]] = dat[5:0];
        @(negedge clk); lat = 0;
        for (int i = 0; i < 4; i++) `CHECK(q[i] == exp[i], "outputs unchanged before CYCLECLK")
      end
      @(negedge clk); cyc = 1; @(negedge clk); cyc = 0;
      exp = stg;
      for (int i = 0; i < 4; i++) `CHECK(q[i] == exp[i], $sformatf("TDAC%0d after CYCLECLK", i))
    end
    `TB_END
  end
endmodule
