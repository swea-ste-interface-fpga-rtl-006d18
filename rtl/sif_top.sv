// sif_top: the SWEA/STE interface FPGA.
// One CLK1M (1 MHz) clock domain, plus the sixteen anode inputs that clock the
// anode counters directly. The external active-low reset HWRSTL is
// synchronised to CLK1M; the subsystems that the specification holds in reset
// while the analog supplies are off (anode counters, sweep, DAC bus, event
// processing, housekeeper, threshold DACs, both test pulsers, MCP DAC) get
// reset OR NOT AFEPWR, and the common DAC clear is driven from that same reset.
// Subsystems and their links follow the overall block diagram: commands
// arrive serially (COMMANDIF), whose time message provides the 1 s tick for
// TIMCNTL; three DAC controllers share the DAC bus through DACWRCNTL; three
// SRAM clients share the 512K x 8 SRAM through MEMCNTL; the housekeeping ADC
// shares the event ADC data bus through the arbiter in EVPROC; TLMMNGR sends
// all telemetry on TDAT. SRAM strobes are active high. The timing parameters
// default to the specification's values and exist so that simulations can
// shorten the 2 s cycle.
// SAMPLECNT from TIMCNTL and the accumulator buffer select from MEMCNTL are
// left unconnected here: the anode test pulser keeps its own divisor and
// MEMCNTL steers the buffers itself, so lint lists them as unused.
module sif_top #(
  parameter int unsigned STEP_CLKS   = 1450,
  parameter int unsigned NSTEPS      = 1344,
  parameter int unsigned DOHSKP_CLKS = 125000,
  parameter int unsigned TP_STEP_CLKS = 100,   // STE test pulser step (100 us)
  parameter int unsigned TP_DAC_BITS  = 16,
  parameter int unsigned FRAME_GAP   = 200
) (
  input  logic        clk1m,
  input  logic        hwrstl,
  // command link
  input  logic        cmdclk,
  input  logic        cmddat,
  // analog front-end power
  input  logic        afeshdn,
  output logic        afepwr,
  output logic        adcrst,
  output logic        nrhvenb,
  output logic        mcphvenb,
  output logic        syn100k,
  output logic        syn100kn,
  // anodes
  input  logic [15:0] apulse,
  output logic        atestpulse,
  // DAC bus and latches
  output logic        dacclr,
  output logic        dacbsel,
  output logic [5:0]  dacwr,
  output logic [7:0]  dacdat,
  output logic        swdaclat,
  output logic        dac4lat,
  output logic        dac5lat,
  output logic        stetestpulse_n,
  output logic [5:0]  tdac [4],
  output logic        ophtrpulse,
  // covers
  input  logic        sweacovstat,
  input  logic [1:0]  stecovstat,
  output logic        sweacovsw,
  output logic [1:0]  stecovsw,
  // STE shaper chains and ADCs
  input  logic [3:0]  peak,
  input  logic [3:0]  lld,
  input  logic [3:0]  uld,
  input  logic [3:0]  adcbusy,
  output logic [3:0]  adcsoc,
  output logic [3:0]  adcread,
  output logic [3:0]  pulserst,
  input  logic [15:0] adcdat,
  // housekeeping ADC and multiplexer
  output logic        hadcsoc,
  input  logic        hadcbusy,
  output logic        hadcread,
  output logic [3:0]  amuxsel,
  // SRAM
  output logic [18:0] madr,
  output logic [7:0]  mdatout,
  input  logic [7:0]  mdatin,
  output logic        memcs,
  output logic        memoe,
  output logic        memwr,
  // telemetry
  output logic        tdat
);
  logic [1:0] rst_sync;
  logic rst, rst_afe;
  always_ff @(posedge clk1m) rst_sync <= {rst_sync[0], ~hwrstl};
  assign rst     = rst_sync[1];
  assign rst_afe = rst | ~afepwr;

  // timing
  logic cycleclk, stepclk, sampleclk, testcycleclk, hskpmd, dohskp, tk1s, secs0;
  logic [8:0] samplecnt;
  logic cur_test, testcyc;

  // command interface outputs
  logic        cmdpe, clrcmdpe;
  logic [15:0] cmd_dat;
  logic mcp_cmdlat, ophtr_cmdlat, tdac_cmdlat, hkps_cmdlat;
  logic slutaddr_lat, slutdata_lat, elutaddr_lat, elutdata_lat;
  logic swbufsel, evbufsel, adcrst_cmd, afepwr_fon, afepwr_foff, enbstetp, enbsweatp, enbswea;
  logic [2:0] tlmenb;
  logic [3:0] chenb;
  logic       sweacovon;
  logic [1:0] stecovon, forstecovon;

  // DAC bus clients
  logic swdacrq, swdacbsel, swdacwrdn, mcpdacrq, mcpdacbsel, mcpdacwrdn;
  logic pulsedacrq, pulsedacbsel, pulsedacwrdn;
  logic [3:0] swdacid;
  logic [7:0] swdacdat, mcpdacdat, pulsedacdat;

  // SRAM clients
  logic        swprq, swpdn, evprq, evpwr, evpdn, tlmrq, tlmwr, tlmdn, abuf;
  logic [12:0] swpadr;
  logic [15:0] evpadr;
  logic [7:0]  evpdat;
  logic [8:0]  tlmadr;

  // housekeeping
  logic        hadcrdrq, hadcrd, hkpgdn;
  logic [15:0] ahkpg, dhkpg;
  logic [13:0] latcnt [16];

  assign adcrst   = adcrst_cmd | ~afepwr;
  assign hadcread = hadcrd;

  timcntl #(.STEP_CLKS(STEP_CLKS), .NSTEPS(NSTEPS), .DOHSKP_CLKS(DOHSKP_CLKS)) u_timcntl (
    .clk(clk1m), .rst, .tk1s, .secs0, .cycleclk, .stepclk, .sampleclk, .samplecnt,
    .testcycleclk, .hskpmd, .dohskp, .syn100k, .syn100kn);

  // remembers whether the cycle now running began with TESTCYCLECLK
  always_ff @(posedge clk1m) begin
    if (rst) cur_test <= 0;
    else if (cycleclk) cur_test <= testcycleclk;
  end
  assign testcyc = cur_test;

  commandif #(.FRAME_GAP(FRAME_GAP)) u_commandif (
    .clk(clk1m), .rst, .cmdclk, .cmddat_in(cmddat), .cycleclk, .clrcmdpe, .cmdpe,
    .cmddat(cmd_dat), .mcp_cmdlat, .ophtr_cmdlat, .tdac_cmdlat, .hkps_cmdlat,
    .slutaddr_lat, .slutdata_lat, .elutaddr_lat, .elutdata_lat, .swbufsel, .evbufsel,
    .tlmenb, .adcrst(adcrst_cmd), .afepwr_fon, .afepwr_foff, .enbstetp, .enbsweatp,
    .chenb, .enbswea, .nrhvenb, .mcphvenb, .sweacovon, .stecovon, .forstecovon,
    .tk1s, .secs0);

  latchupprot u_latchupprot (.clk(clk1m), .rst, .afeshdn, .afepwr_fon, .afepwr_foff, .afepwr);

  dacwrcntl u_dacwrcntl (
    .clk(clk1m), .rst(rst_afe), .swdacrq, .swdacid, .swdacbsel, .swdacdat,
    .mcpdacrq, .mcpdacbsel, .mcpdacdat, .pulsedacrq, .pulsedacbsel, .pulsedacdat,
    .swdacwrdn, .mcpdacwrdn, .pulsedacwrdn, .dacclr, .dacbsel, .dacwr, .dacdat);

  dacsweep #(.NSTEPS(NSTEPS + 1)) u_dacsweep (
    .clk(clk1m), .rst(rst_afe), .enbswea, .stepclk, .cycleclk,
    .memrdrq(swprq), .memadr(swpadr), .memrddn(swpdn), .memdatin(mdatin),
    .dacwrrq(swdacrq), .dacid(swdacid), .dacbytesel(swdacbsel), .dacdat(swdacdat),
    .dacwrdn(swdacwrdn), .daclat(swdaclat));

  mcpdac u_mcpdac (
    .clk(clk1m), .rst(rst_afe), .enbswea, .mcp_cmdlat, .cmd_dat, .cycleclk,
    .dacwrdn(mcpdacwrdn), .dacwrrq(mcpdacrq), .dacbytesel(mcpdacbsel), .dacdat(mcpdacdat),
    .daclat(dac4lat));

  ophtrcntl u_ophtrcntl (.clk(clk1m), .rst, .cmd_lat(ophtr_cmdlat), .cmd_dat, .pulse_out(ophtrpulse));

  atestpulse u_atestpulse (
    .clk(clk1m), .rst(rst_afe), .enbswea, .enbsweatp, .cycleclk, .sampleclk, .testpulse(atestpulse));

  tdacs u_tdacs (.clk(clk1m), .rst(rst_afe), .tdac_cmdlat, .cmd_dat, .cycleclk, .tdac);

  stetestpulse #(.STEP_CLKS(TP_STEP_CLKS), .DAC_BITS(TP_DAC_BITS)) u_stetestpulse (
    .clk(clk1m), .rst(rst_afe), .enbstetp, .testcycleclk, .dacwrdn(pulsedacwrdn),
    .dacwrrq(pulsedacrq), .dacbytesel(pulsedacbsel), .dacdat(pulsedacdat), .daclat(dac5lat),
    .testpulse_n(stetestpulse_n));

  covercntl u_covercntl (
    .clk(clk1m), .rst, .sweacovon, .stecovon, .forstecovon, .stecovstat, .sweacovsw, .stecovsw);

  acounters u_acounters (.clk(clk1m), .rst(rst_afe), .enbswea, .sampleclk, .apulse, .latcnt);

  evproc u_evproc (
    .clk(clk1m), .rst(rst_afe), .chenb, .peak, .lld, .uld, .adcbusy, .adcsoc, .adcread,
    .pulserst, .adcdat(adcdat[11:0]), .hadcrdrq, .hadcrd,
    .memrq(evprq), .memwr(evpwr), .memadr(evpadr), .memdatout(evpdat), .memdn(evpdn),
    .memdatin(mdatin));

  hskpr u_hskpr (
    .clk(clk1m), .rst(rst_afe), .hkps_cmdlat, .cmd_dat, .cmdpe, .afepwr, .afeshdn,
    .sweacovstat, .stecovsw, .stecovstat, .hskpmd, .dohskp, .sampleclk, .cycleclk,
    .hadcsoc, .hadcbusy, .hadcrdrq, .hadcrd, .hadcdat(adcdat), .amuxsel, .ahkpg, .dhkpg,
    .hkpgdn);

  memcntl u_memcntl (
    .clk(clk1m), .rst, .cycleclk, .cmd_dat, .elutaddr_lat, .slutaddr_lat, .elutdata_lat,
    .slutdata_lat, .ebufsel(evbufsel), .sbufsel(swbufsel),
    .swprq, .swpadr, .swpdn, .evprq, .evpadr, .evpwr, .evpdat, .evpdn,
    .tlmrq, .tlmadr, .tlmwr, .tlmdn, .abuf, .madr, .mdatout, .memcs, .memoe, .memwr);

  tlmmngr u_tlmmngr (
    .clk(clk1m), .rst, .tlmenb, .enbswea, .hskpmd, .sampleclk, .cycleclk, .testcyc,
    .latcnt, .ahkpg, .dhkpg, .hkpgdn, .clrcmdpe,
    .memrq(tlmrq), .memwr(tlmwr), .memadr(tlmadr), .memdn(tlmdn), .memdatin(mdatin), .tdat);
endmodule
