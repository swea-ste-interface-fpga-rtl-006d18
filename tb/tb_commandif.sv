// Testbench of commandif: sends serial frames (ID, data, odd parity) and
// checks each command's effect: strobes with data, staged controls that wait
// for CYCLECLK, immediate controls, the parity-error flag and its clear, the
// E3 one-bit rule, arm/force protection and its expiry at CYCLECLK, the time
// message and recovery from an aborted partial frame.
// What is checked follows the specification's description of the block;
// the encodings and handshakes that this design chose itself are checked as
// documented in the module, and the models' random timings are the
// testbench's own.
`include "tb_check.svh"
module tb_commandif;
  import sif_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, cmdclk = 0, sd = 0, cyc = 0, clrpe = 0;
  logic cmdpe, mcp, oph, tdl, hks, sal, sdl, eal, edl, swb, evb, adcrst, fon, foff;
  logic etp_ste, etp_swea, enbswea, nrhv, mcphv, swcov, tk1s, secs0;
  logic [15:0] cdat;
  logic [2:0] tlm;
  logic [3:0] chenb;
  logic [1:0] stecov, forcov;
  commandif #(.FRAME_GAP(40)) dut (
    .clk, .rst, .cmdclk, .cmddat_in(sd), .cycleclk(cyc), .clrcmdpe(clrpe), .cmdpe, .cmddat(cdat),
    .mcp_cmdlat(mcp), .ophtr_cmdlat(oph), .tdac_cmdlat(tdl), .hkps_cmdlat(hks),
    .slutaddr_lat(sal), .slutdata_lat(sdl), .elutaddr_lat(eal), .elutdata_lat(edl),
    .swbufsel(swb), .evbufsel(evb), .tlmenb(tlm), .adcrst, .afepwr_fon(fon), .afepwr_foff(foff),
    .enbstetp(etp_ste), .enbsweatp(etp_swea), .chenb, .enbswea, .nrhvenb(nrhv), .mcphvenb(mcphv),
    .sweacovon(swcov), .stecovon(stecov), .forstecovon(forcov), .tk1s, .secs0);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  // strobe counters
  int n_mcp, n_oph, n_tdl, n_hks, n_sal, n_sdl, n_eal, n_edl, n_tk;
  always @(posedge clk) if (!rst) begin
    n_mcp += mcp; n_oph += oph; n_tdl += tdl; n_hks += hks;
    n_sal += sal; n_sdl += sdl; n_eal += eal; n_edl += edl; n_tk += tk1s;
  end

  task automatic send_bits(logic [24:0] f, int nb);
    for (int i = 24; i > 24 - nb; i--) begin
      sd = f[i]; repeat (4) @(negedge clk); cmdclk = 1; repeat (4) @(negedge clk); cmdclk = 0;
    end
  endtask
  task automatic send(logic [7:0] id, logic [15:0] d, bit bad = 0);
    logic [23:0] w = {id, d};
    send_bits({w, ~^w ^ bad}, 25);
    repeat (6) @(negedge clk);
  endtask
  task automatic cycle();
    @(negedge clk); cyc = 1; @(negedge clk); cyc = 0;
  endtask

  initial begin
    {n_mcp, n_oph, n_tdl, n_hks, n_sal, n_sdl, n_eal, n_edl, n_tk} = '0;
    repeat (4) @(negedge clk); rst = 0;
    `CHECK(adcrst && !enbswea && tlm == 0 && stecov == 0, "reset defaults")
    // strobes
    send(CMD_MCPDAC, 16'h00A5);  `CHECK(n_mcp == 1 && cdat == 16'h00A5, "E1 strobe and data")
    send(CMD_OPHTR, 16'h0007);   `CHECK(n_oph == 1 && cdat == 16'h0007, "E4 strobe")
    send(CMD_TDAC, 16'h00C9);    `CHECK(n_tdl == 1, "E5 strobe")
    send(CMD_HSKPSEL, 16'h0003); `CHECK(n_hks == 1, "E7 strobe")
    send(CMD_SLUTADR, 16'h1234); `CHECK(n_sal == 1, "E8 strobe")
    send(CMD_SLUTDAT, 16'hBEEF); `CHECK(n_sdl == 1 && cdat == 16'hBEEF, "E9 strobe")
    send(CMD_ELUTADR, 16'h4321); `CHECK(n_eal == 1, "EA strobe")
    send(CMD_ELUTDAT, 16'hCAFE); `CHECK(n_edl == 1, "EB strobe")
    // parity error: ignored, flag set, cleared by CLRCMDPE
    send(CMD_MCPDAC, 16'h0011, 1);
    `CHECK(cmdpe && n_mcp == 1 && cdat == 16'hCAFE, "bad parity ignored and flagged")
    @(negedge clk); clrpe = 1; @(negedge clk); clrpe = 0;
    `CHECK(!cmdpe, "CMDPE cleared")
    // controls: immediate and staged parts
    send(CMD_CONTROL, 16'b111_1_1_0_11_1010_0_1_1_1);
    `CHECK(!adcrst && fon && !foff && enbswea && nrhv && mcphv, "E2 immediate bits")
    `CHECK(tlm == 0 && !etp_ste && !etp_swea && chenb == 0, "E2 staged bits wait")
    cycle();
    `CHECK(tlm == 3'b111 && etp_ste && etp_swea && chenb == 4'b1010, "E2 staged bits at CYCLECLK")
    send(CMD_BUFSEL, 16'h0002);
    `CHECK(!swb && !evb, "E0 waits for CYCLECLK")
    cycle();
    `CHECK(swb && !evb, "E0 buffer selects at CYCLECLK")
    // actuators
    send(CMD_ACTUATOR, 16'b1_00_01);
    `CHECK(swcov && stecov == 2'b01, "E3 SWEA cover and STE open")
    send(CMD_ACTUATOR, 16'b0_00_11);
    `CHECK(!swcov && stecov == 2'b01, "E3 with two STE bits ignored")
    send(CMD_ACTUATOR, 16'b0_01_00);
    `CHECK(forcov == 2'b00 && stecov == 2'b00, "force without arm has no effect")
    send(CMD_ARM, 16'h0001);
    send(CMD_ACTUATOR, 16'b0_01_00);
    `CHECK(forcov == 2'b01, "armed force open")
    send(CMD_ACTUATOR, 16'b0_00_00);
    send(CMD_ACTUATOR, 16'b0_01_00);
    `CHECK(forcov == 2'b00, "arm used up by the force command")
    send(CMD_ARM, 16'h0002); cycle();
    send(CMD_ACTUATOR, 16'b0_10_00);
    `CHECK(forcov == 2'b00, "arm expires at CYCLECLK")
    send(CMD_ARM, 16'h0003);
    send(CMD_ACTUATOR, 16'b0_10_00);
    `CHECK(forcov == 2'b00, "E6 with both bits ignored")
    send(CMD_ARM, 16'h0002);
    send(CMD_ACTUATOR, 16'b0_10_00);
    `CHECK(forcov == 2'b10, "armed force close")
    // time message
    send(CMD_TIME, 16'h0001); `CHECK(n_tk == 1 && secs0, "F0 tick, odd second")
    send(CMD_TIME, 16'h0002); `CHECK(n_tk == 2 && !secs0, "F0 tick, even second")
    // partial frame aborted by a pause
    send_bits(25'h1FFFFFF, 9); repeat (60) @(negedge clk);
    send(CMD_MCPDAC, 16'h005A);
    `CHECK(n_mcp == 2 && cdat == 16'h005A && !cmdpe, "frame after aborted partial frame")
    `TB_END
  end
endmodule
