// HSKPR: housekeeper.
// Controls the analog multiplexer (AMUXSEL) and the housekeeping ADC, and
// forms the digital housekeeping word DHKPG.
//   CYCLING mode (HSKPMD = 0): at CYCLECLK the channel is set to 0; every
//   DOHSKP tick starts a conversion; when its result is in, HKPGDN is pulsed
//   and the channel advances, so the 16 channels are scanned once per cycle.
//   SWEEP mode (HSKPMD = 1): at CYCLECLK the channel is set to the value last
//   loaded by the channel-select command; conversions run at every SAMPLECLK
//   on that channel, and HKPGDN is pulsed at every DOHSKP (8 per second) so
//   that the telemetry manager sends the latest result.
// Conversion: HADCSOC is held until HADCBUSY rises, then the housekeeper waits
// for HADCBUSY to fall and requests the shared ADC bus (HADCRDRQ) from the
// event processor; the word on HADCDAT is taken in the HADCRD cycle and
// becomes AHKPG, with its channel recorded for DHKPG[15:12]. A trigger that
// arrives while a conversion is still running is skipped.
// DHKPG = {channel of last conversion, HSKPMD, 3'b000, STECOVSW[1:0],
// STECOVSTAT[1:0], SWEACOVSTAT, AFESHDN, AFEPWR, CMDPE}, the register layout
// of the specification with the undefined bits 10:8 set to zero.
module hskpr (
  input  logic        clk,
  input  logic        rst,
  input  logic        hkps_cmdlat,
  input  logic [15:0] cmd_dat,
  input  logic        cmdpe,
  input  logic        afepwr,
  input  logic        afeshdn,
  input  logic        sweacovstat,
  input  logic [1:0]  stecovsw,
  input  logic [1:0]  stecovstat,
  input  logic        hskpmd,
  input  logic        dohskp,
  input  logic        sampleclk,
  input  logic        cycleclk,
  output logic        hadcsoc,
  input  logic        hadcbusy,
  output logic        hadcrdrq,
  input  logic        hadcrd,
  input  logic [15:0] hadcdat,
  output logic [3:0]  amuxsel,
  output logic [15:0] ahkpg,
  output logic [15:0] dhkpg,
  output logic        hkpgdn
);
  import sif_pkg::*;
  typedef enum logic [1:0] {H_IDLE, H_SOC, H_BUSY, H_RD} h_e;

  h_e         st;
  logic [3:0] sweep_sel, last_ch;
  wire sweep   = (hskpmd == HK_SWEEP);
  wire trigger = sweep ? sampleclk : dohskp;

  assign hadcsoc  = (st == H_SOC);
  assign hadcrdrq = (st == H_RD);
  assign dhkpg    = {last_ch, hskpmd, 3'b000, stecovsw, stecovstat, sweacovstat,
                     afeshdn, afepwr, cmdpe};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= H_IDLE; sweep_sel <= '0; last_ch <= '0; amuxsel <= '0; ahkpg <= '0; hkpgdn <= 0;
    end else begin
      hkpgdn <= sweep & dohskp;
      if (hkps_cmdlat) sweep_sel <= cmd_dat[3:0];
      if (cycleclk) amuxsel <= sweep ? sweep_sel : 4'd0;
      case (st)
        H_IDLE: if (trigger) st <= H_SOC;
        H_SOC:  if (hadcbusy) st <= H_BUSY;
        H_BUSY: if (!hadcbusy) st <= H_RD;
        H_RD:   if (hadcrd) begin
                  ahkpg   <= hadcdat;
                  last_ch <= amuxsel;
                  st      <= H_IDLE;
                  if (!sweep) begin
                    hkpgdn <= 1;
                    if (!cycleclk) amuxsel <= amuxsel + 1'b1;
                  end
                end
        default: ;
      endcase
    end
  end
endmodule
