// EVPROC: STE event processing and ADC data-bus arbiter.
// Four shaper chains share one 12-bit ADC data bus with the 16-bit
// housekeeping ADC. Per chain i:
//   IDLE : ADCSOC[i] is a purely combinational function of the chain inputs,
//          so the start of conversion follows the peak with gate delay only:
//          ADCSOC[i] = CHENB[i] & PEAK[i] & LLD[i] & ~ULD[i] (the
//          qualification is this design's choice; the exact criteria are in an
//          external document). Once started, ADCSOC[i] is held (SOC state)
//          until ADCBUSY[i] rises, then it falls.
//   CONV : waits for ADCBUSY[i] to fall, then the event is pending.
//   PEND : waits for the bus arbiter; events on this chain are dropped
//          meanwhile. When granted, ADCREAD[i] is high for one cycle, the
//          data are taken from ADCDAT[11:0], PULSERST[i] resets the chain's peak
//          hold and the chain returns to IDLE.
// The arbiter is round robin over the four chains and the housekeeping read
// request HADCRDRQ (answered with a one-cycle HADCRD read strobe, the
// housekeeper takes the data itself). A chain is granted only when the event
// engine is free. The engine looks up the 8-bit bin at energy LUT address
// {1'b0, chain, adc[11:0]}, then reads the 16-bit bin counter from the
// accumulator (two bytes, high byte at the even address), increments it
// (saturating at 16'hFFFF, this design's choice) and writes it back: one byte
// read, one word read and one word write per event, as specified.
// Memory client: MEMADR[15] = 0 energy LUT, 1 accumulator; MEMRQ is held until
// MEMDN, MEMWR selects a write of MEMDATOUT.
module evproc #(
  parameter int unsigned NCH = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] chenb,
  input  logic [NCH-1:0] peak,
  input  logic [NCH-1:0] lld,
  input  logic [NCH-1:0] uld,
  input  logic [NCH-1:0] adcbusy,
  output logic [NCH-1:0] adcsoc,
  output logic [NCH-1:0] adcread,
  output logic [NCH-1:0] pulserst,
  input  logic [11:0]    adcdat,
  input  logic           hadcrdrq,
  output logic           hadcrd,
  // SRAM client
  output logic           memrq,
  output logic           memwr,
  output logic [15:0]    memadr,
  output logic [7:0]     memdatout,
  input  logic           memdn,
  input  logic [7:0]     memdatin
);
  typedef enum logic [1:0] {C_IDLE, C_SOC, C_CONV, C_PEND} ch_e;
  typedef enum logic [2:0] {E_IDLE, E_LUT, E_RDH, E_RDL, E_WRH, E_WRL} eng_e;

  ch_e  cst [NCH];
  eng_e est;
  logic [$clog2(NCH+1)-1:0] last;       // last granted requester (NCH = housekeeping)
  logic [NCH:0] rq, gnt;
  logic [11:0]  adc;
  logic [1:0]   chan;
  logic [7:0]   bin;
  logic [15:0]  cnt;
  logic         bus_busy;               // read strobe cycle in progress

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      adcsoc[i] = ((cst[i] == C_IDLE && chenb[i] && peak[i] && lld[i] && !uld[i]) ||
                   cst[i] == C_SOC) && !rst;
      rq[i]     = (cst[i] == C_PEND) && (est == E_IDLE);
    end
    rq[NCH] = hadcrdrq;
    gnt = '0;
    if (!bus_busy)
      for (int k = 1; k <= NCH + 1; k++) begin
        automatic int c = (int'(last) + k) % (NCH + 1);
        if (gnt == '0 && rq[c]) gnt[c] = 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCH; i++) cst[i] <= C_IDLE;
      est <= E_IDLE; last <= '0; adc <= '0; chan <= '0; bin <= '0; cnt <= '0;
      adcread <= '0; pulserst <= '0; hadcrd <= 0; bus_busy <= 0;
    end else begin
      adcread <= '0; pulserst <= '0; hadcrd <= 0; bus_busy <= 0;
      for (int i = 0; i < NCH; i++)
        case (cst[i])
          C_IDLE: if (adcsoc[i]) cst[i] <= adcbusy[i] ? C_CONV : C_SOC;
          C_SOC:  if (adcbusy[i]) cst[i] <= C_CONV;
          C_CONV: if (!adcbusy[i]) cst[i] <= C_PEND;
          default: ;
        endcase
      if (gnt != '0) begin
        bus_busy <= 1;
        for (int c = 0; c <= NCH; c++) if (gnt[c]) last <= $bits(last)'(c);
        if (gnt[NCH]) hadcrd <= 1;
        else adcread <= gnt[NCH-1:0];
      end
      // data are valid during the read strobe
      for (int i = 0; i < NCH; i++)
        if (adcread[i]) begin
          adc <= adcdat; chan <= 2'(i); pulserst[i] <= 1; cst[i] <= C_IDLE; est <= E_LUT;
        end
      case (est)
        E_LUT: if (memdn) begin bin <= memdatin; est <= E_RDH; end
        E_RDH: if (memdn) begin cnt[15:8] <= memdatin; est <= E_RDL; end
        E_RDL: if (memdn) begin
                 cnt <= ({cnt[15:8], memdatin} == 16'hFFFF) ? 16'hFFFF
                                                            : {cnt[15:8], memdatin} + 1'b1;
                 est <= E_WRH;
               end
        E_WRH: if (memdn) est <= E_WRL;
        E_WRL: if (memdn) est <= E_IDLE;
        default: ;
      endcase
    end
  end

  always_comb begin
    memrq = 0; memwr = 0; memadr = '0; memdatout = '0;
    case (est)
      E_LUT: begin memrq = 1; memadr = {1'b0, 1'b0, chan, adc}; end
      E_RDH: begin memrq = 1; memadr = {7'b1000000, bin, 1'b0}; end
      E_RDL: begin memrq = 1; memadr = {7'b1000000, bin, 1'b1}; end
      E_WRH: begin memrq = 1; memwr = 1; memadr = {7'b1000000, bin, 1'b0}; memdatout = cnt[15:8]; end
      E_WRL: begin memrq = 1; memwr = 1; memadr = {7'b1000000, bin, 1'b1}; memdatout = cnt[7:0]; end
      default: ;
    endcase
  end
endmodule
