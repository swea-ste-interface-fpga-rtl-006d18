// Testbench of tlmmngr: a serial receiver model decodes TDAT (start bit,
// 16-bit words MSB first, length from the header) and an SRAM model holds
// the accumulator buffer. Checks the C0 and C1 anode messages against the
// holding registers, the C4 housekeeping message and its CMDPE clear, the
// C2/C3 energy-bin messages against the SRAM contents followed by the buffer
// clear, the telemetry enables, and the 16-clock word period.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_tlmmngr;
  import sif_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, md = 0, samp = 0, cyc = 0, testc = 0, hkdn = 0, en = 1;
  logic [2:0] tlmenb = 3'b000;
  logic [13:0] lat [16];
  logic [15:0] ahk = 16'h1234, dhk = 16'h8001;
  logic clrpe, mrq, mwr, mdn, tdat;
  logic [8:0] madr;
  logic [7:0] mem [512];
  tlmmngr dut (.clk, .rst, .tlmenb, .enbswea(en), .hskpmd(md), .sampleclk(samp), .cycleclk(cyc),
               .testcyc(testc), .latcnt(lat), .ahkpg(ahk), .dhkpg(dhk), .hkpgdn(hkdn), .clrcmdpe(clrpe),
               .memrq(mrq), .memwr(mwr), .memadr(madr), .memdn(mdn), .memdatin(mem[madr]), .tdat);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  // SRAM model with random wait states (up to 2)
  int mw = 0;
  assign mdn = mrq && mw == 0;
  always @(posedge clk) if (!rst && mrq) begin
    mw <= (mw == 0) ? $urandom_range(0, 2) : mw - 1;
    if (mdn && mwr) mem[madr] <= 8'h00;
  end

  // receiver
  typedef logic [15:0] msg_t [$];
  msg_t msgs [$];
  msg_t cur;
  int bitn = -1, npe = 0;
  logic [15:0] sh;
  always @(posedge clk) if (!rst) begin
    if (clrpe) npe++;
    if (bitn < 0) begin
      if (tdat) begin bitn = 0; cur = {}; end
    end else begin
      sh = {sh[14:0], tdat}; bitn++;
      if (bitn == 16) begin
        cur.push_back(sh); bitn = 0;
        if (cur.size() == int'(cur[0][9:0])) begin msgs.push_back(cur); bitn = -1; end
      end
    end
  end

  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  task automatic check_anode(bit hk);
    msg_t m;
    `CHECK(msgs.size() == 1, $sformatf("one anode message, got %0d", msgs.size()))
    if (msgs.size() == 0) return;
    m = msgs.pop_front();
    `CHECK(m[0] == (hk ? {6'h01, 10'd18} : {6'h00, 10'd17}), $sformatf("anode header %h", m[0]))
    for (int c = 0; c < 16; c++) `CHECK(m[c + 1] == 16'(lat[c]), $sformatf("anode word %0d", c))
    if (hk) `CHECK(m[17] == ahk, "sweep housekeeping value appended")
  endtask

  initial begin
    for (int c = 0; c < 16; c++) lat[c] = 14'($urandom);
    for (int i = 0; i < 512; i++) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst = 0;
    pulse(samp); pulse(hkdn); repeat (600) @(negedge clk);
    `CHECK(msgs.size() == 0, "nothing sent while disabled")
    tlmenb = 3'b110;
    pulse(samp); repeat (400) @(negedge clk); check_anode(0);
    md = 1; pulse(samp); repeat (400) @(negedge clk); check_anode(1);
    en = 0; pulse(samp); repeat (400) @(negedge clk);
    `CHECK(msgs.size() == 0, "no anode message while the SWEA is disabled")
    en = 1;
    begin
      automatic int t0, t1;
      pulse(hkdn); t0 = $time;
      wait (msgs.size() == 1); t1 = $time;
      `CHECK((t1 - t0) / 10 <= 3 * 16 + 6, $sformatf("housekeeping message time %0d clocks", (t1 - t0) / 10))
    end
    begin
      automatic msg_t m = msgs.pop_front();
      `CHECK(m.size() == 3 && m[0] == {6'h04, 10'd3} && m[1] == ahk && m[2] == dhk, "C4 housekeeping message")
      `CHECK(npe == 1, "CMDPE clear after housekeeping message")
    end
    // energy bins, test cycle
    tlmenb = 3'b001; testc = 1;
    begin
      automatic logic [7:0] snap [512];
      automatic int t0;
      automatic msg_t m;
      snap = mem;
      pulse(cyc); t0 = $time;
      wait (msgs.size() == 1);
      `CHECK(($time - t0) / 10 <= 257 * 16 + 40, $sformatf("bin message time %0d clocks", ($time - t0) / 10))
      m = msgs.pop_front();
      `CHECK(m.size() == 257 && m[0] == {6'h03, 10'd257}, $sformatf("C3 header %h", m[0]))
      for (int b = 0; b < 256; b++)
        `CHECK(m[b + 1] == {snap[2 * b], snap[2 * b + 1]}, $sformatf("bin %0d", b))
      repeat (3000) @(negedge clk);
      for (int i = 0; i < 512; i++) `CHECK(mem[i] == 0, "accumulator cleared after the message")
    end
    // normal cycle, anode message in the middle of the bin message
    tlmenb = 3'b101; testc = 0;
    for (int i = 0; i < 512; i++) mem[i] = 8'(i);
    pulse(cyc); repeat (100) @(negedge clk); pulse(samp);
    wait (msgs.size() == 2); repeat (400) @(negedge clk);
    begin
      automatic msg_t m = msgs.pop_front();
      `CHECK(m.size() == 257 && m[0] == {6'h02, 10'd257} && m[256] == 16'h_FEFF, "C2 message")
      m = msgs.pop_front();
      `CHECK(m.size() == 18, "anode message after the bin message")
    end
    `TB_END
  end
endmodule
