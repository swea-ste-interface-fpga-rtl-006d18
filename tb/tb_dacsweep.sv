// Testbench of dacsweep with a 6-step cycle: an SRAM model answers reads
// after random delays with a byte computed from the address, a DAC bus model
// grants writes and keeps per-DAC holding and output registers. At every
// SWDACLAT the four DAC outputs must hold the table entries of the step just
// latched (step 0 at CYCLECLK), for SW_BYTES = 1 and 2.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_dacsweep;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, step = 0, cyc = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 40000)

  function automatic logic [7:0] f(int a); return 8'(a * 37 + 11); endfunction

  for (genvar B = 1; B <= 2; B++) begin : g_b
    logic mrq, mdn, wrq, bsel, wdn, lat;
    logic [12:0] madr;
    logic [3:0] id;
    logic [7:0] wd;
    logic [15:0] hold [4], outv [4];
    int mwait = 0, s = -1, seen = 0;
    dacsweep #(.NSTEPS(6), .SW_BYTES(B)) dut (
      .clk, .rst, .enbswea(en), .stepclk(step), .cycleclk(cyc),
      .memrdrq(mrq), .memadr(madr), .memrddn(mdn), .memdatin(f(madr)),
      .dacwrrq(wrq), .dacid(id), .dacbytesel(bsel), .dacdat(wd), .dacwrdn(wdn), .daclat(lat));
    assign mdn = mrq && (mwait == 0);
    always @(posedge clk) begin
      if (mrq) mwait <= (mwait == 0) ? $urandom_range(0, 3) : mwait - 1;
      wdn <= wrq && !wdn;
      if (wrq && wdn)
        for (int d = 0; d < 4; d++) if (id[d]) begin
          if (B == 1 || !bsel) hold[d][7:0] <= wd; else hold[d][15:8] <= wd;
        end
      if (lat) begin
        s = cyc ? 0 : s + 1;
        for (int d = 0; d < 4; d++) outv[d] = hold[d];
        if (seen >= 7) begin
          for (int d = 0; d < 4; d++) begin
            automatic logic [15:0] e = (B == 1) ? 16'(f(s * 4 + d))
                                     : {f((s * 4 + d) * 2), f((s * 4 + d) * 2 + 1)};
            `CHECK(outv[d][8*B-1:0] == e[8*B-1:0], $sformatf("B=%0d step %0d DAC %0d", B, s, d))
          end
        end
        seen++;
      end
    end
  end

  initial begin
    for (int d = 0; d < 4; d++) begin g_b[1].hold[d] = 0; g_b[2].hold[d] = 0; end
    repeat (3) @(negedge clk); rst = 0; en = 1;
    for (int c = 0; c < 5; c++)
      for (int k = 0; k < 6; k++) begin
        @(negedge clk); step = 1; cyc = (k == 0); @(negedge clk); step = 0; cyc = 0;
        repeat (200) @(negedge clk);
      end
    `CHECK(g_b[1].seen == 30 && g_b[2].seen == 30, "one latch per STEPCLK")
    `TB_END
  end
endmodule
