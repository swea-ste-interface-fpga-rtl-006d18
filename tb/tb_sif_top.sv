// End-to-end testbench of sif_top at the specification's timing (all
// parameters at their defaults): nine 2 s cycles plus setup, about 20 M
// clocks. Models around the FPGA: a command link sender, the 512K x 8 SRAM
// (energy LUT preloaded, bin = ADC value XOR 61 * chain), DACs on the shared
// bus, four shaper chains with their ADCs, the housekeeping ADC, sixteen anode
// inputs, cover status switches and a telemetry receiver.
// The scenario loads the whole sweep LUT through commands, sets all enables,
// loads the MCP, threshold and heater values, then lets the cycles run and
// checks: sweep DAC outputs at every SWDACLAT against the table, MCP and
// threshold DAC values, heater duty, anode counter messages against the
// pulses sent, housekeeping messages (cycling channels 0..15 and sweep
// channel), energy-bin messages against the events accepted in the previous
// cycle (C3 after the test cycle, C2 otherwise), the STE test pulser ramp,
// cover control with arm/force, the parity-error flag, and AFE shutdown.
// Each mechanism is counted and must occur at least once.
// Timing, message contents, DAC and cover behaviour are checked against the
// specification; the command frame, the SRAM map and the telemetry framing
// the models use are this design's own choices, as are all model timings.
`include "tb_check.svh"
module tb_sif_top;
  import sif_pkg::*;
  localparam int NSTEPS_ALL = 1345, NDAC = 4;
  localparam int CMD_HALF = 2;                // CMDCLK half period in clocks

  int checks = 0, failures = 0;
  logic clk = 0, hwrstl = 0, cmdclk = 0, cmddat = 0, afeshdn = 0;
  logic afepwr, adcrst, nrhvenb, mcphvenb, syn, synn, atp, dacclr, dacbsel, swdaclat, dac4lat, dac5lat;
  logic stp_n, ophtr, sweacovstat = 0, sweacovsw, hadcsoc, hadcbusy = 0, hadcread, memcs, memoe, memwr, tdat;
  logic [15:0] apulse = 0, adcdat;
  logic [5:0] dacwr, tdac [4];
  logic [7:0] dacdat, mdatout, mdatin;
  logic [1:0] stecovstat = 0, stecovsw;
  logic [3:0] peak = 0, lld = 0, uld = 0, adcbusy = 0, adcsoc, adcread, pulserst, amuxsel;
  logic [18:0] madr;

  sif_top dut (
    .clk1m(clk), .hwrstl, .cmdclk, .cmddat, .afeshdn, .afepwr, .adcrst, .nrhvenb, .mcphvenb,
    .syn100k(syn), .syn100kn(synn), .apulse, .atestpulse(atp), .dacclr, .dacbsel, .dacwr, .dacdat,
    .swdaclat, .dac4lat, .dac5lat, .stetestpulse_n(stp_n), .tdac, .ophtrpulse(ophtr),
    .sweacovstat, .stecovstat, .sweacovsw, .stecovsw, .peak, .lld, .uld, .adcbusy, .adcsoc,
    .adcread, .pulserst, .adcdat, .hadcsoc, .hadcbusy, .hadcread, .amuxsel,
    .madr, .mdatout, .mdatin, .memcs, .memoe, .memwr, .tdat);

  always #500 clk = ~clk;
  `WATCHDOG(clk, 21_000_000)

  int t = 0;
  always @(posedge clk) t++;

  // ---------------- mechanism counters ----------------
  int m_memwait = 0, m_dacwait = 0, m_evdrop = 0, m_adcshare = 0, m_msgwait = 0, m_parity = 0;
  int m_force = 0, m_latchup = 0, m_swap = 0, m_testcyc = 0, m_sweepmode = 0, m_cycmode = 0;
  logic abuf_q = 0;
  always @(posedge clk) if (hwrstl) begin
    if ($countones(dut.u_memcntl.rq) > 1) m_memwait++;
    if (dut.swdacrq && (dut.mcpdacrq || dut.pulsedacrq)) m_dacwait++;
    if (dut.hadcrdrq && (dut.u_evproc.rq[3:0] != 0 || dut.u_evproc.est != 0)) m_adcshare++;
    if ((dut.u_tlmmngr.anode_pend || dut.u_tlmmngr.hk_pend) && dut.u_tlmmngr.sst != 0) m_msgwait++;
    if (dut.u_memcntl.abuf != abuf_q) m_swap++;
    abuf_q = dut.u_memcntl.abuf;
    if (dut.testcycleclk) m_testcyc++;
    if (dut.cycleclk) begin if (dut.hskpmd) m_sweepmode++; else m_cycmode++; end
  end

  // ---------------- SRAM model ----------------
  logic [7:0] mem [2**19];
  assign mdatin = mem[madr];
  always @(posedge clk) if (memcs && memwr) mem[madr] <= mdatout;
  function automatic logic [7:0] elut(int ch, int a); return 8'(a ^ (ch * 61)); endfunction
  function automatic logic [7:0] slut(int s, int d); return 8'(s * 7 + d * 50 + 3); endfunction

  // ---------------- command link ----------------
  typedef struct { logic [7:0] id; logic [15:0] d; bit bad; } cmd_t;
  cmd_t q [$];
  int next_f0 = 20_000, secs = 0;
  task automatic frame(logic [7:0] id, logic [15:0] d, bit bad);
    logic [24:0] f = {id, d, ~^{id, d} ^ bad};
    for (int i = 24; i >= 0; i--) begin
      cmddat = f[i]; repeat (CMD_HALF) @(negedge clk); cmdclk = 1; repeat (CMD_HALF) @(negedge clk); cmdclk = 0;
    end
    repeat (6) @(negedge clk);
  endtask
  initial begin
    wait (hwrstl);
    forever begin
      if (t >= next_f0) begin
        frame(CMD_TIME, 16'(secs + 1), 0); secs++; next_f0 += 1_000_000;
      end else if (q.size() != 0 && t + 25 * 2 * CMD_HALF + 20 < next_f0) begin
        automatic cmd_t c = q.pop_front(); frame(c.id, c.d, c.bad);
      end else @(negedge clk);
    end
  end
  function automatic void cmd(logic [7:0] id, logic [15:0] d, bit bad = 0);
    cmd_t c; c.id = id; c.d = d; c.bad = bad; q.push_back(c);
  endfunction
  task automatic wait_cmds(); wait (q.size() == 0); repeat (200) @(negedge clk); endtask
  task automatic wait_secs(int s); wait (secs == s); repeat (10) @(negedge clk); endtask

  // ---------------- DAC bus model ----------------
  logic [15:0] dhold [6], dout [6];
  int cur_step = -1, ncyc = 0, sweep_checked = 0, sweep_bad = 0, n4lat = 0, n5lat = 0, ramp_bad = 0;
  logic [15:0] last5;
  always @(posedge clk) if (hwrstl) begin
    for (int k = 0; k < 6; k++)
      if (dacwr[k]) begin if (dacbsel) dhold[k][15:8] = dacdat; else dhold[k][7:0] = dacdat; end
    if (dacclr) for (int k = 0; k < 6; k++) begin dhold[k] = 0; dout[k] = 0; end
    if (dut.cycleclk) ncyc++;
    if (swdaclat) begin
      cur_step = dut.cycleclk ? 0 : cur_step + 1;
      for (int k = 0; k < 4; k++) dout[k] = dhold[k];
      if (ncyc >= 2 || (ncyc == 1 && cur_step >= 1)) begin
        for (int k = 0; k < 4; k++) if (dout[k][7:0] != slut(cur_step, k)) sweep_bad++;
        sweep_checked++;
      end
    end
    if (dac4lat) begin dout[4] = dhold[4]; n4lat++; end
    if (dac5lat) begin
      if (dhold[5] != 16'(last5 + 1) && dhold[5] != 0) ramp_bad++;
      last5 = dhold[5]; dout[5] = dhold[5]; n5lat++;
    end
  end
  int n_stp = 0;
  logic stp_q = 1;
  always @(posedge clk) begin if (stp_q && !stp_n) n_stp++; stp_q = stp_n; end

  // ---------------- anode pulses ----------------
  int apn [16];
  logic [15:0][15:0] anode_exp [$];   // [message][channel] expected counts
  logic apulse_on = 0;
  always @(negedge clk) if (hwrstl && dut.sampleclk && dut.tlmenb[2] && dut.enbswea) begin
    logic [15:0][15:0] e;
    for (int c = 0; c < 16; c++) e[c] = 16'(apn[c]);
    anode_exp.push_back(e);
    for (int c = 0; c < 16; c++) apn[c] = 0;
  end
  initial begin
    for (int c = 0; c < 16; c++) apn[c] = 0;
    forever begin
      @(negedge clk);
      if (apulse_on && !dut.sampleclk && !dut.u_acounters.clr && $urandom_range(0, 99) == 0) begin
        automatic logic [15:0] m = 16'($urandom);
        #100 apulse = m; #270 apulse = 0;
        for (int c = 0; c < 16; c++) apn[c] += m[c];
      end
    end
  end

  // ---------------- shaper chains, ADCs ----------------
  int hist [256];            // events accepted in the current cycle
  int prev_hist [256];
  logic [11:0] conv [4];
  int bl [4];
  logic ev_on = 0;
  logic [15:0] hres, hk_n = 0;
  int hbl = 0;
  always_comb begin
    adcdat = 16'h0;
    for (int i = 0; i < 4; i++) if (adcread[i]) adcdat = 16'(conv[i]);
    if (hadcread) adcdat = hres;
  end
  always @(posedge clk) if (hwrstl) begin
    if (dut.cycleclk) begin prev_hist = hist; for (int b = 0; b < 256; b++) hist[b] = 0; end
    for (int i = 0; i < 4; i++) begin
      if (adcsoc[i] && !adcbusy[i]) begin
        adcbusy[i] <= 1; bl[i] <= $urandom_range(2, 6); conv[i] <= 12'($urandom);
      end else if (adcbusy[i]) begin
        if (bl[i] == 0) begin adcbusy[i] <= 0; hist[elut(i, conv[i])]++; end else bl[i] <= bl[i] - 1;
      end
      if (peak[i] && lld[i] && !uld[i] && dut.chenb[i] && !adcsoc[i]) m_evdrop++;
      if (peak[i]) peak[i] <= 0;
      else if (ev_on && $urandom_range(0, 29) == 0) begin
        peak[i] <= 1; lld[i] <= 1; uld[i] <= ($urandom_range(0, 9) == 0);
      end
    end
    if (hadcsoc && !hadcbusy) begin hadcbusy <= 1; hbl <= 4; hres <= {amuxsel, 12'(hk_n)}; end
    else if (hadcbusy) begin if (hbl == 0) begin hadcbusy <= 0; hk_n <= hk_n + 1; end else hbl <= hbl - 1; end
  end
  // events only in the middle of a cycle, so each lands in one accumulator buffer
  int cyc_t0 = 0;
  always @(posedge clk) if (dut.cycleclk) cyc_t0 = t;
  always @(posedge clk) ev_on <= ev_en && (t - cyc_t0) > 20_000 && (t - cyc_t0) < 1_900_000;
  logic ev_en = 0;

  // ---------------- telemetry receiver ----------------
  typedef logic [15:0] msg_t [$];
  msg_t cur;
  int bitn = -1;
  logic [15:0] sh;
  int n_c0 = 0, n_c1 = 0, n_c2 = 0, n_c3 = 0, n_c4 = 0, anode_bad = 0, hk_bad = 0, bin_bad = 0;
  int pe_seen = 0, hk_ch_next = 0, bins_checked = 0;
  always @(posedge clk) if (hwrstl) begin
    if (bitn < 0) begin
      if (tdat) begin bitn = 0; cur = {}; end
    end else begin
      sh = {sh[14:0], tdat}; bitn++;
      if (bitn == 16) begin
        cur.push_back(sh); bitn = 0;
        if (cur.size() == int'(cur[0][9:0])) begin bitn = -1; got(cur); end
      end
    end
  end
  function automatic void got(msg_t m);
    case (m[0][15:10])
      6'h00, 6'h01: begin
        automatic logic [15:0][15:0] e;
        if (m[0][10]) n_c1++; else n_c0++;
        if (anode_exp.size() == 0) begin anode_bad++; return; end
        e = anode_exp.pop_front();
        for (int c = 0; c < 16; c++) if (m[c + 1] != e[c]) begin anode_bad++; if (anode_bad < 20) $display("%0t anode %0d ch %0d got %0d exp %0d", $time, n_c0+n_c1, c, m[c+1], e[c]); end
        if (m[0][10] && m.size() != 18) anode_bad++;
      end
      6'h04: begin
        n_c4++;
        if (m.size() != 3) hk_bad++;
        if (m[2][0]) pe_seen++;
        if (!m[2][11]) begin      // cycling mode: channels in order
          if (m[1][15:12] != 4'(hk_ch_next)) hk_bad++;
          hk_ch_next = (hk_ch_next + 1) % 16;
        end else if (m[1][15:12] != 4'd5 && !m[2][2]) hk_bad++;   // no conversion while shut down
      end
      6'h02, 6'h03: begin
        if (m[0][10]) n_c3++; else n_c2++;
        for (int b = 0; b < 256; b++) if (m[b + 1] != 16'(prev_hist[b])) bin_bad++;
        bins_checked++;
      end
      default: begin hk_bad++; $display("unknown message %h", m[0]); end
    endcase
  endfunction
  // housekeeping channel sequence restarts at every cycling-mode CYCLECLK
  always @(posedge clk) if (dut.cycleclk) hk_ch_next = 0;

  // ---------------- scenario ----------------
  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    for (int b = 0; b < 2; b++)
      for (int ch = 0; ch < 4; ch++)
        for (int a = 0; a < 4096; a++) mem[{3'b000, 1'(b), 1'b0, 2'(ch), 12'(a)}] = elut(ch, a);
    for (int b = 0; b < 256; b++) begin hist[b] = 0; prev_hist[b] = 0; end
    for (int k = 0; k < 6; k++) begin dhold[k] = 0; dout[k] = 0; end
    for (int i = 0; i < 4; i++) begin conv[i] = 0; bl[i] = 0; end
    hres = 0; last5 = 0;
    repeat (10) @(negedge clk); hwrstl = 1;
    // enables: all telemetry, ADCs on, both test pulsers, all chains, SWEA, HV
    cmd(CMD_CONTROL, 16'b111_1_0_0_11_1111_0_1_1_1);
    cmd(CMD_MCPDAC, 16'h00C5);
    cmd(CMD_TDAC, 16'h0041); cmd(CMD_TDAC, 16'h0082); cmd(CMD_TDAC, 16'h00C3); cmd(CMD_TDAC, 16'h0004);
    cmd(CMD_OPHTR, 16'h0007);
    cmd(CMD_HSKPSEL, 16'h0005);
    // whole sweep table into buffer 1 (buffer 0 is the read buffer now)
    cmd(CMD_SLUTADR, 16'h0000);
    for (int w = 0; w < NSTEPS_ALL * NDAC / 2; w++)
      cmd(CMD_SLUTDAT, {slut((2 * w) / 4, (2 * w) % 4), slut((2 * w + 1) / 4, (2 * w + 1) % 4)});
    // two energy LUT words into buffer 1
    cmd(CMD_ELUTADR, 16'h2000); cmd(CMD_ELUTDAT, 16'h1122); cmd(CMD_ELUTDAT, 16'h3344);
    cmd(CMD_BUFSEL, 16'h0002);       // sweep reads buffer 1 from the next cycle
    wait_cmds();
    `CHECK(afepwr && !adcrst && nrhvenb && mcphvenb, "immediate controls")
    `CHECK(mem[19'h0A000] == 8'h11 && mem[19'h0A001] == 8'h22 && mem[19'h0A002] == 8'h33, "energy LUT writes")
    `CHECK(tdac[1] == 0, "threshold DACs staged")
    // heater duty 7/10
    begin
      automatic int h = 0;
      repeat (1000) begin @(negedge clk); h += ophtr; end
      `CHECK(h == 700, $sformatf("heater duty %0d/1000", h))
    end
    wait_secs(2);                    // first CYCLECLK
    `CHECK(tdac[0] == 4 && tdac[1] == 1 && tdac[2] == 2 && tdac[3] == 3, $sformatf("threshold DACs at CYCLECLK %0d %0d %0d %0d", tdac[0], tdac[1], tdac[2], tdac[3]))
    `CHECK(n4lat == 1 && dout[4] == 16'hC500, "MCP DAC upper byte latched at CYCLECLK")
    apulse_on = 1; ev_en = 1;
    // covers
    cmd(CMD_ACTUATOR, 16'h0011); wait_cmds();
    `CHECK(sweacovsw && stecovsw == 2'b01, "cover open switch on")
    stecovstat = 2'b01; repeat (5) @(negedge clk);
    `CHECK(stecovsw == 2'b00, "cover open switch off at status")
    cmd(CMD_ARM, 16'h0002); cmd(CMD_ACTUATOR, 16'h0008); stecovstat = 2'b10; wait_cmds();
    `CHECK(stecovsw == 2'b10, "forced close despite status");
    if (stecovsw == 2'b10) m_force++;
    cmd(CMD_ACTUATOR, 16'h0000); wait_cmds();
    `CHECK(stecovsw == 2'b00 && !sweacovsw, "covers off")
    // parity error reported once in housekeeping
    cmd(CMD_MCPDAC, 16'h0099, 1); wait_cmds();
    if (dut.cmdpe) m_parity++;
    wait_secs(19);
    // AFE shutdown, then force on
    afeshdn = 1; repeat (5) @(negedge clk);
    `CHECK(!afepwr && dacclr && adcrst, "AFE shutdown removes power, clears DACs, resets ADCs")
    if (!afepwr) m_latchup++;
    cmd(CMD_CONTROL, 16'b111_1_1_0_11_1111_0_1_1_1); wait_cmds();
    `CHECK(afepwr && !dacclr, "force on restores power")
    // results
    `CHECK(sweep_checked > 8 * NSTEPS_ALL && sweep_bad == 0, $sformatf("sweep DAC steps checked %0d bad %0d", sweep_checked, sweep_bad))
    `CHECK(n5lat == 65536 && ramp_bad == 0 && dout[5] == 0, $sformatf("STE ramp latches %0d bad %0d", n5lat, ramp_bad))
    `CHECK(n_stp >= 65536, $sformatf("STE test pulses %0d", n_stp))
    `CHECK(n_c0 > 0 && n_c1 > 0 && n_c0 + n_c1 >= 2800 && anode_bad == 0, $sformatf("anode msgs C0 %0d C1 %0d bad %0d", n_c0, n_c1, anode_bad))
    `CHECK(n_c4 >= 130 && hk_bad == 0, $sformatf("housekeeping msgs %0d bad %0d", n_c4, hk_bad))
    `CHECK(pe_seen == 1, $sformatf("parity error reported %0d times", pe_seen))
    `CHECK(n_c3 == 2 && n_c2 >= 6 && bin_bad == 0, $sformatf("bin msgs C2 %0d C3 %0d bad %0d", n_c2, n_c3, bin_bad))
    `CHECK(m_memwait > 0, "SRAM arbitration wait happened")
    `CHECK(m_dacwait > 0, "DAC bus contention happened")
    `CHECK(m_evdrop > 0, "events dropped while pending")
    `CHECK(m_adcshare > 0, "housekeeping and event ADC reads competed")
    `CHECK(m_msgwait > 0, "anode message waited behind another message")
    `CHECK(m_parity > 0, "parity error")
    `CHECK(m_force > 0, "armed force")
    `CHECK(m_latchup > 0, "latch-up shutdown")
    `CHECK(m_swap >= 4, "accumulator buffer swaps")
    `CHECK(m_testcyc >= 1, "test cycle")
    `CHECK(m_sweepmode > 0 && m_cycmode > 0, "both housekeeping modes")
    $display("mechanisms: memwait=%0d dacwait=%0d evdrop=%0d adcshare=%0d msgwait=%0d swap=%0d",
             m_memwait, m_dacwait, m_evdrop, m_adcshare, m_msgwait, m_swap);
    `TB_END
  end
endmodule
