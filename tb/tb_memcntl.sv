// Testbench of memcntl with a 512K x 8 SRAM model: commanded LUT words land
// in the inactive buffer (high byte first) and the pointer advances; the
// three clients' addresses map to their regions and buffers as specified in
// the memory map; reads return SRAM data and writes store it; with every
// client requesting all the time each gets one access in four cycles.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_memcntl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, cyc = 0;
  logic [15:0] cd = 0;
  logic eal = 0, sal = 0, edl = 0, sdl = 0, ebs = 0, sbs = 0;
  logic swprq = 0, evprq = 0, evpwr = 0, tlmrq = 0, tlmwr = 0;
  logic [12:0] swpadr = 0;
  logic [15:0] evpadr = 0;
  logic [7:0] evpdat = 0;
  logic [8:0] tlmadr = 0;
  logic swpdn, evpdn, tlmdn, abuf, cs, oe, we;
  logic [18:0] madr;
  logic [7:0] mdo;
  logic [7:0] mem [2**19];
  memcntl dut (.clk, .rst, .cycleclk(cyc), .cmd_dat(cd), .elutaddr_lat(eal), .slutaddr_lat(sal),
    .elutdata_lat(edl), .slutdata_lat(sdl), .ebufsel(ebs), .sbufsel(sbs),
    .swprq, .swpadr, .swpdn, .evprq, .evpadr, .evpwr, .evpdat, .evpdn,
    .tlmrq, .tlmadr, .tlmwr, .tlmdn, .abuf, .madr, .mdatout(mdo), .memcs(cs), .memoe(oe), .memwr(we));
  wire [7:0] mdi = mem[madr];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  always @(posedge clk) if (cs && we) mem[madr] <= mdo;

  task automatic strobe(ref logic s, input logic [15:0] v);
    @(negedge clk); cd = v; s = 1; @(negedge clk); s = 0; repeat (4) @(negedge clk);
  endtask

  int gsw = 0, gev = 0, gtl = 0, wait_sw = 0, maxwait = 0;
  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    repeat (3) @(negedge clk); rst = 0;
    // LUT writes: sweep buffer select 0 -> writes go to buffer 1
    strobe(sal, 16'h0010);                 // word address 8
    strobe(sdl, 16'hBEEF); strobe(sdl, 16'h1234);
    `CHECK(mem[19'h18010] == 8'hBE && mem[19'h18011] == 8'hEF, "sweep LUT word 8 in buffer 1")
    `CHECK(mem[19'h18012] == 8'h12 && mem[19'h18013] == 8'h34, "pointer advanced to word 9")
    ebs = 1;
    strobe(eal, 16'h7FFE);                 // word address 16383
    strobe(edl, 16'hA55A);
    `CHECK(mem[19'h07FFE] == 8'hA5 && mem[19'h07FFF] == 8'h5A, "energy LUT word in buffer 0")
    // sweep read of what was written, after swapping the read buffer
    sbs = 1; @(negedge clk); swprq = 1; swpadr = 13'h0011; #1;
    `CHECK(swpdn && oe && !we && madr == 19'h18011 && mdi == 8'hEF, "sweep read from buffer 1")
    @(negedge clk); swprq = 0;
    // EVPROC write into the accumulator, then TLMMNGR sees it after the swap
    evprq = 1; evpwr = 1; evpadr = 16'h8000 | 16'h0123; evpdat = 8'h77; #1;
    `CHECK(evpdn && we && madr == {3'b010, abuf, 6'b0, 9'h123}, "accumulator write, buffer ABUF")
    @(negedge clk); evprq = 0; evpwr = 0;
    evprq = 1; evpadr = 16'h0ABC; #1;
    `CHECK(evpdn && oe && madr == {3'b000, 1'b1, 15'h0ABC}, "energy LUT read, buffer EBUFSEL")
    @(negedge clk); evprq = 0;
    @(negedge clk); cyc = 1; @(negedge clk); cyc = 0;
    tlmrq = 1; tlmadr = 9'h123; #1;
    `CHECK(tlmdn && oe && mdi == 8'h77, "telemetry reads the other accumulator buffer")
    @(negedge clk); tlmwr = 1; #1;
    `CHECK(tlmdn && we && mdo == 0, "telemetry clear writes zero")
    @(negedge clk); tlmrq = 0; tlmwr = 0;
    // fairness with all clients busy, including a LUT write
    swprq = 1; evprq = 1; tlmrq = 1; cd = 16'h0001; sdl = 1;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk); #1;
      `CHECK($onehot0({swpdn, evpdn, tlmdn}), "one client per cycle")
      gsw += swpdn; gev += evpdn; gtl += tlmdn;
      wait_sw = swpdn ? 0 : wait_sw + 1; if (wait_sw > maxwait) maxwait = wait_sw;
      @(negedge clk); sdl = 0;
    end
    `CHECK(gsw >= 130 && gev >= 130 && gtl >= 130, $sformatf("shares %0d %0d %0d", gsw, gev, gtl))
    `CHECK(maxwait <= 3, "no client waits more than three cycles")
    `TB_END
  end
endmodule
