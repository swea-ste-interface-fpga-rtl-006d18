// MEMCNTL: controller of the external 512K x 8 SRAM.
// Clients: DACSWEEP (sweep LUT reads), EVPROC (energy LUT reads and
// accumulator read-modify-write), TLMMNGR (accumulator reads and clears) and
// the LUT writes commanded through COMMANDIF, which are generated here from
// the LUT address-pointer and data-word strobes (each data word becomes two
// byte writes, high byte at the even address, then the pointer advances).
// One byte access per CLK1M cycle: a round-robin arbiter picks one of the
// requesting clients combinationally, drives address, data and the active-high
// strobes MEMCS/MEMOE/MEMWR for that cycle, and raises that client's done
// flag in the same cycle; read data is MDATIN, which the client samples at
// the end of the cycle (an asynchronous SRAM read completes within 1 us).
// Round robin guarantees every client one access in four cycles, which covers
// the bandwidth the specification lists (the telemetry manager needs two
// bytes per 16 us). Clients give region-relative addresses; MEMCNTL adds the
// region and buffer select (memory map in sif_pkg). Double buffering: the LUT
// read buffers are the commanded selects and commanded LUT writes go to the
// other buffer; EVPROC accumulates into ABUF and TLMMNGR reads and clears the
// other accumulator buffer; ABUF toggles at every CYCLECLK.
module memcntl (
  input  logic        clk,
  input  logic        rst,
  input  logic        cycleclk,
  // LUT writes from the command interface
  input  logic [15:0] cmd_dat,
  input  logic        elutaddr_lat,
  input  logic        slutaddr_lat,
  input  logic        elutdata_lat,
  input  logic        slutdata_lat,
  input  logic        ebufsel,
  input  logic        sbufsel,
  // DACSWEEP client (read only, sweep LUT)
  input  logic        swprq,
  input  logic [12:0] swpadr,
  output logic        swpdn,
  // EVPROC client: adr[15] = 0 energy LUT adr[14:0], 1 accumulator adr[8:0]
  input  logic        evprq,
  input  logic [15:0] evpadr,
  input  logic        evpwr,
  input  logic [7:0]  evpdat,
  output logic        evpdn,
  // TLMMNGR client (accumulator of the other buffer; writes store zero)
  input  logic        tlmrq,
  input  logic [8:0]  tlmadr,
  input  logic        tlmwr,
  output logic        tlmdn,
  output logic        abuf,
  // SRAM bus
  output logic [18:0] madr,
  output logic [7:0]  mdatout,
  output logic        memcs,
  output logic        memoe,
  output logic        memwr
);
  import sif_pkg::*;

  logic [11:0] sptr;
  logic [13:0] eptr;
  logic [15:0] sdat, edat;
  logic [1:0]  spend, epend;   // bytes still to write: 2 = high, 1 = low
  logic        lwrq;
  logic [3:0]  rq, gnt;
  logic [1:0]  last;

  assign lwrq = (epend != 0) || (spend != 0);
  assign rq   = {lwrq, tlmrq, evprq, swprq};

  // round robin: search starting after the last granted client; no access
  // is granted during reset, so client state left over from power-up cannot
  // write the SRAM
  always_comb begin
    gnt = '0;
    for (int k = 1; k <= 4; k++) begin
      automatic logic [1:0] c = 2'(last + k);
      if (!rst && gnt == '0 && rq[c]) gnt[c] = 1'b1;
    end
  end

  assign swpdn = gnt[0];
  assign evpdn = gnt[1];
  assign tlmdn = gnt[2];

  always_comb begin
    madr = '0; mdatout = '0; memcs = |gnt; memoe = 0; memwr = 0;
    unique case (1'b1)
      gnt[0]: begin madr = sram_addr(RGN_SLUT, sbufsel, {2'b0, swpadr}); memoe = 1; end
      gnt[1]: begin
        madr = evpadr[15] ? sram_addr(RGN_ACC, abuf, {6'b0, evpadr[8:0]})
                          : sram_addr(RGN_ELUT, ebufsel, evpadr[14:0]);
        memoe = ~evpwr; memwr = evpwr; mdatout = evpdat;
      end
      gnt[2]: begin
        madr = sram_addr(RGN_ACC, ~abuf, {6'b0, tlmadr});
        memoe = ~tlmwr; memwr = tlmwr; mdatout = 8'h00;
      end
      gnt[3]: begin
        memwr = 1;
        if (epend != 0) begin
          madr    = sram_addr(RGN_ELUT, ~ebufsel, {eptr, epend == 2'd1});
          mdatout = (epend == 2'd2) ? edat[15:8] : edat[7:0];
        end else begin
          madr    = sram_addr(RGN_SLUT, ~sbufsel, {2'b0, sptr, spend == 2'd1});
          mdatout = (spend == 2'd2) ? sdat[15:8] : sdat[7:0];
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last <= 2'd3; abuf <= 0; sptr <= '0; eptr <= '0; sdat <= '0; edat <= '0;
      spend <= '0; epend <= '0;
    end else begin
      if (cycleclk) abuf <= ~abuf;
      for (int c = 0; c < 4; c++) if (gnt[c]) last <= 2'(c);
      if (gnt[3]) begin
        if (epend != 0) begin
          epend <= epend - 1'b1;
          if (epend == 2'd1) eptr <= eptr + 1'b1;
        end else begin
          spend <= spend - 1'b1;
          if (spend == 2'd1) sptr <= sptr + 1'b1;
        end
      end
      if (elutaddr_lat) eptr <= cmd_dat[14:1];
      if (slutaddr_lat) sptr <= cmd_dat[12:1];
      if (elutdata_lat) begin edat <= cmd_dat; epend <= 2'd2; end
      if (slutdata_lat) begin sdat <= cmd_dat; spend <= 2'd2; end
    end
  end
endmodule
