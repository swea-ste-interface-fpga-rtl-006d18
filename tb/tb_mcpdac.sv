// Testbench of mcpdac: a DAC bus model grants after a random delay; each
// load must produce exactly one upper-byte write of the commanded value and a
// single DAC4LAT at the first CYCLECLK after the write; ENBSWEA low holds the
// block idle.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_mcpdac;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, lat = 0, cyc = 0, wrdn = 0, rq, bsel, dlat;
  logic [15:0] cd = 0;
  logic [7:0] dd;
  mcpdac dut (.clk, .rst, .enbswea(en), .mcp_cmdlat(lat), .cmd_dat(cd), .cycleclk(cyc),
              .dacwrdn(wrdn), .dacwrrq(rq), .dacbytesel(bsel), .dacdat(dd), .daclat(dlat));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  int nwr = 0, nlat = 0, wait_c = 0;
  logic [7:0] last_wr;
  always @(posedge clk) if (!rst) begin
    wrdn <= 0;
    if (rq && !wrdn) begin
      if (wait_c == 0) begin
        wrdn <= 1; nwr++; last_wr = dd;
        `CHECK(bsel, "upper byte selected")
        wait_c = $urandom_range(1, 5);
      end else wait_c--;
    end
    if (dlat) nlat++;
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); cd = 16'h1234; lat = 1; @(negedge clk); lat = 0;
    repeat (20) @(negedge clk);
    `CHECK(nwr == 0, "no write while ENBSWEA is low")
    en = 1;
    for (int k = 0; k < 20; k++) begin
      automatic logic [7:0] v = 8'($urandom);
      @(negedge clk); cd = {8'($urandom), v}; lat = 1; @(negedge clk); lat = 0;
      repeat (15) @(negedge clk);
      `CHECK(nwr == k + 1 && last_wr == v, $sformatf("write %0d of %h", k, v))
      `CHECK(nlat == k, "not latched before CYCLECLK")
      @(negedge clk); cyc = 1; @(negedge clk); cyc = 0; @(negedge clk);
      `CHECK(nlat == k + 1, "DAC4LAT at CYCLECLK")
      @(negedge clk); cyc = 1; @(negedge clk); cyc = 0; @(negedge clk);
      `CHECK(nlat == k + 1, "only one latch per load")
    end
    `TB_END
  end
endmodule
