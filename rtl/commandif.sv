// COMMANDIF: serial command interface and command decoder.
// Frame (this design's choice; the bit-level format is defined in an external
// interface document): CMDCLK and CMDDAT are sampled with CLK1M through
// two-stage synchronisers and a bit is taken on every rising CMDCLK edge,
// 25 bits MSB first: command ID[7:0], data D[15:0], then a parity bit that
// makes the number of ones in all 25 bits odd. A pause of more than FRAME_GAP
// CLK1M cycles without a CMDCLK edge aborts a partial frame. A frame with bad
// parity is ignored and sets CMDPE, which stays set until CLRCMDPE.
// Command effects follow the command table: E2 enables for the test pulsers,
// telemetry and shaper chains, and the E0 buffer selects, are staged and take
// effect at the next CYCLECLK; all other E2/E3 controls take effect at once.
// E1, E4, E5, E7-EB produce one-cycle strobes with the data on CMDDAT for the
// subsystem that executes them. E3 is ignored if more than one of D[3:0] is
// set, and a force bit acts only if the matching E6 arm was received earlier
// in the same 2 s cycle (arms are cleared at CYCLECLK and used up by E3).
// E6 is ignored if both arm bits are set. The time message F0 gives TK1S (a
// one-cycle pulse) and SECS0 = D[0]. All controls are 0 after reset.
module commandif #(
  parameter int unsigned FRAME_GAP = 200  // CLK1M cycles that end a partial frame
) (
  input  logic        clk,          // CLK1M
  input  logic        rst,
  input  logic        cmdclk,       // serial command clock
  input  logic        cmddat_in,    // serial command data
  input  logic        cycleclk,
  input  logic        clrcmdpe,     // clear parity error flag (after housekeeping telemetry)
  output logic        cmdpe,
  output logic [15:0] cmddat,       // data of the last valid command
  output logic        mcp_cmdlat,   // E1
  output logic        ophtr_cmdlat, // E4
  output logic        tdac_cmdlat,  // E5
  output logic        hkps_cmdlat,  // E7
  output logic        slutaddr_lat, // E8
  output logic        slutdata_lat, // E9
  output logic        elutaddr_lat, // EA
  output logic        elutdata_lat, // EB
  output logic        swbufsel,     // sweep LUT read buffer
  output logic        evbufsel,     // energy LUT read buffer
  output logic [2:0]  tlmenb,       // [2] anode counter msgs, [1] housekeeping msgs, [0] STE-PHA msgs
  output logic        adcrst,       // ADC reset (ADCs not active)
  output logic        afepwr_fon,
  output logic        afepwr_foff,
  output logic        enbstetp,     // STE test pulser enable
  output logic        enbsweatp,    // SWEA test pulser enable
  output logic [3:0]  chenb,        // shaper chain enables
  output logic        enbswea,
  output logic        nrhvenb,
  output logic        mcphvenb,
  output logic        sweacovon,
  output logic [1:0]  stecovon,     // [1] cover in (close), [0] cover out (open)
  output logic [1:0]  forstecovon,  // forced versions
  output logic        tk1s,
  output logic        secs0
);
  import sif_pkg::*;

  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [24:0] shreg;
  logic [4:0]  nbits;
  logic [$clog2(FRAME_GAP+1)-1:0] gap;
  logic        frame_done;
  logic [24:0] frame;
  logic [1:0]  arm;
  // staged values
  logic [1:0]  bufsel_stg;
  logic [2:0]  tlmenb_stg;
  logic [1:0]  tp_stg;
  logic [3:0]  chenb_stg;

  wire clk_rise = clk_sync[1] & ~clk_sync[2];
  assign frame  = {shreg[23:0], dat_sync[1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '0; dat_sync <= '0; shreg <= '0; nbits <= '0; gap <= '0;
    end else begin
      clk_sync <= {clk_sync[1:0], cmdclk};
      dat_sync <= {dat_sync[0], cmddat_in};
      if (clk_rise) begin
        gap   <= '0;
        shreg <= frame;
        nbits <= (nbits == 5'd24) ? 5'd0 : nbits + 1'b1;
      end else if (nbits != 0) begin
        if (gap == $bits(gap)'(FRAME_GAP)) nbits <= '0;
        else gap <= gap + 1'b1;
      end
    end
  end
  assign frame_done = clk_rise && nbits == 5'd24;

  wire       par_ok = ^frame;        // odd number of ones
  wire [7:0] id     = frame[24:17];
  wire [15:0] d     = frame[16:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cmdpe <= 0; cmddat <= '0;
      {mcp_cmdlat, ophtr_cmdlat, tdac_cmdlat, hkps_cmdlat} <= '0;
      {slutaddr_lat, slutdata_lat, elutaddr_lat, elutdata_lat} <= '0;
      {swbufsel, evbufsel} <= '0; bufsel_stg <= '0;
      tlmenb <= '0; tlmenb_stg <= '0; tp_stg <= '0; chenb_stg <= '0;
      adcrst <= 1; afepwr_fon <= 0; afepwr_foff <= 0;
      enbstetp <= 0; enbsweatp <= 0; chenb <= '0;
      enbswea <= 0; nrhvenb <= 0; mcphvenb <= 0;
      sweacovon <= 0; stecovon <= '0; forstecovon <= '0; arm <= '0;
      tk1s <= 0; secs0 <= 0;
    end else begin
      {mcp_cmdlat, ophtr_cmdlat, tdac_cmdlat, hkps_cmdlat} <= '0;
      {slutaddr_lat, slutdata_lat, elutaddr_lat, elutdata_lat} <= '0;
      tk1s <= 0;
      if (clrcmdpe) cmdpe <= 0;
      if (cycleclk) begin
        {swbufsel, evbufsel}  <= bufsel_stg;
        tlmenb                <= tlmenb_stg;
        {enbstetp, enbsweatp} <= tp_stg;
        chenb                 <= chenb_stg;
        arm                   <= '0;
      end
      if (frame_done && !par_ok) cmdpe <= 1;
      if (frame_done && par_ok) begin
        cmddat <= d;
        case (id)
          CMD_BUFSEL:  bufsel_stg <= d[1:0];
          CMD_MCPDAC:  mcp_cmdlat <= 1;
          CMD_CONTROL: begin
            tlmenb_stg  <= d[15:13];
            adcrst      <= ~d[12];
            afepwr_fon  <= d[11];
            afepwr_foff <= d[10];
            tp_stg      <= d[9:8];
            chenb_stg   <= d[7:4];
            enbswea     <= d[2];
            nrhvenb     <= d[1];
            mcphvenb    <= d[0];
          end
          CMD_ACTUATOR: begin
            sweacovon <= d[4];
            if ($countones(d[3:0]) <= 1) begin
              stecovon    <= d[1:0];
              forstecovon <= d[3:2] & arm;
              arm         <= arm & ~d[3:2];
            end
          end
          CMD_OPHTR:   ophtr_cmdlat <= 1;
          CMD_TDAC:    tdac_cmdlat  <= 1;
          CMD_ARM:     if (d[1:0] != 2'b11) arm <= d[1:0];
          CMD_HSKPSEL: hkps_cmdlat  <= 1;
          CMD_SLUTADR: slutaddr_lat <= 1;
          CMD_SLUTDAT: slutdata_lat <= 1;
          CMD_ELUTADR: elutaddr_lat <= 1;
          CMD_ELUTDAT: elutdata_lat <= 1;
          CMD_TIME: begin tk1s <= 1; secs0 <= d[0]; end
          default: ;
        endcase
      end
    end
  end
endmodule
