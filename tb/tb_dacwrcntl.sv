// Testbench of dacwrcntl: three client models issue random byte writes; a
// bus monitor checks every write strobe against the data the client offered,
// that each write lasts two cycles, that simultaneous requests are served in
// the order sweep, MCP, STE pulser, and that DACCLR follows reset.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_dacwrcntl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [2:0] rq = 0, dn, bs;
  logic [7:0] d [3];
  logic [3:0] swid;
  logic clr, bsel;
  logic [5:0] wr;
  logic [7:0] dat;
  dacwrcntl dut (.clk, .rst, .swdacrq(rq[0]), .swdacid(swid), .swdacbsel(bs[0]), .swdacdat(d[0]),
    .mcpdacrq(rq[1]), .mcpdacbsel(bs[1]), .mcpdacdat(d[1]), .pulsedacrq(rq[2]), .pulsedacbsel(bs[2]),
    .pulsedacdat(d[2]), .swdacwrdn(dn[0]), .mcpdacwrdn(dn[1]), .pulsedacwrdn(dn[2]),
    .dacclr(clr), .dacbsel(bsel), .dacwr(wr), .dacdat(dat));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)
  int served [3], started [3];
  int t = 0;
  // client models: hold the request until done, then drop it for a while
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < 3; c++) begin
      if (rq[c] && dn[c]) rq[c] <= 0;
      else if (!rq[c] && $urandom_range(0, 3) == 0) begin
        rq[c] <= 1; d[c] <= 8'($urandom); bs[c] <= 1'($urandom);
        if (c == 0) swid <= 4'(1 << $urandom_range(0, 3));
        started[c]++;
      end
    end
  end
  always @(posedge clk) if (!rst) begin
    t++;
    if (wr != 0) begin
      automatic int c = wr[5] ? 2 : wr[4] ? 1 : 0;
      `CHECK($onehot(dn) && dn[c], "done goes to the owner of the strobe")
      `CHECK(dat == d[c] && bsel == bs[c], "data and byte select of the client")
      if (c == 0) `CHECK(wr[3:0] == swid, "sweep DAC address")
      served[c]++;
    end
  end
  // priority: when the bus was free at an edge, the write that follows must
  // belong to the highest-priority client requesting at that edge
  logic [2:0] pend = 0;
  logic       decide = 0;
  always @(posedge clk) if (!rst) begin
    if (decide && pend != 0) begin
      automatic int w = pend[0] ? 0 : pend[1] ? 1 : 2;
      `CHECK(dn[w], $sformatf("priority: requests %b, served %b", pend, dn))
    end
    decide <= (wr == 0);
    pend   <= rq;
  end
  initial begin
    for (int c = 0; c < 3; c++) begin served[c] = 0; started[c] = 0; d[c] = 0; end
    bs = 0; swid = 1;
    repeat (2) @(posedge clk); #1 `CHECK(clr, "DACCLR during reset")
    @(negedge clk); rst = 0; #1 `CHECK(!clr, "DACCLR released")
    // latency of a lone write: request to strobe is one cycle, strobe lasts one
    repeat (20000) @(posedge clk);
    for (int c = 0; c < 3; c++)
      `CHECK(served[c] > 100, $sformatf("client %0d served %0d times", c, served[c]))
    `CHECK(served[0] + served[1] + served[2] <= 10000, "at most one write per two cycles")
    `TB_END
  end
endmodule
