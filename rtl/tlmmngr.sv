// TLMMNGR: telemetry manager.
// Builds the telemetry messages and sends them on the serial output TDAT.
//   C0/C1 anode counters : after every SAMPLECLK (if anode telemetry and the
//        SWEA are enabled): header + the 16 holding registers; in SWEEP
//        housekeeping mode (C1) the housekeeping ADC value is appended.
//   C4 housekeeping      : on every HKPGDN (if enabled): header, AHKPG, DHKPG;
//        CLRCMDPE is pulsed when DHKPG is sent, so a parity error is reported
//        once.
//   C2/C3 energy bins    : after every CYCLECLK (if enabled): header + the 256
//        16-bit bin counters of the accumulator buffer filled during the
//        previous cycle, read from SRAM as two bytes each (high byte first);
//        C3 when that cycle began with TESTCYCLECLK. After the message, or at
//        once if disabled, the buffer is cleared with 512 byte writes, before
//        the next CYCLECLK swaps it back to the event processor.
// Header = {ID[5:0], length[9:0]} with the length in words, header included.
// Line format (this design's choice, the link protocol is external): idle low,
// one start bit '1', then all words back to back, MSB first, one bit per CLK1M
// cycle, i.e. 16 us per word, matching the SRAM read rate the specification
// quotes (two byte reads per 16 us). Message priority: anode, housekeeping,
// energy bins; a pending message waits for the one being sent. Bin words are
// prefetched while the previous word is shifted out.
module tlmmngr #(
  parameter int unsigned NCH = 16,
  parameter int unsigned CW  = 14,
  parameter int unsigned NBIN = 256
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [2:0]    tlmenb,     // [2] anode, [1] housekeeping, [0] STE-PHA
  input  logic          enbswea,
  input  logic          hskpmd,
  input  logic          sampleclk,
  input  logic          cycleclk,
  input  logic          testcyc,    // the cycle now ending began with TESTCYCLECLK
  input  logic [CW-1:0] latcnt [NCH],
  input  logic [15:0]   ahkpg,
  input  logic [15:0]   dhkpg,
  input  logic          hkpgdn,
  output logic          clrcmdpe,
  // SRAM client (accumulator buffer not used by the event processor)
  output logic          memrq,
  output logic          memwr,
  output logic [8:0]    memadr,
  input  logic          memdn,
  input  logic [7:0]    memdatin,
  output logic          tdat
);
  import sif_pkg::*;
  typedef enum logic [1:0] {T_ANODE, T_HSKP, T_EBIN} msg_e;
  typedef enum logic [1:0] {S_IDLE, S_START, S_SHIFT, S_WAIT} ser_e;
  typedef enum logic [1:0] {M_IDLE, M_FH, M_FL, M_CLR} mem_e;

  ser_e        sst;
  mem_e        mst;
  msg_e        mtype;
  logic        anode_pend, anode_hk, hk_pend, ebin_pend, ebin_test, ebin_sent;
  logic [15:0] shreg;
  logic [3:0]  bitcnt;
  logic [8:0]  widx, len;
  logic [8:0]  fidx;            // next bin to fetch
  logic [15:0] nextw;
  logic        nextv;
  logic [9:0]  clr_idx;
  logic [15:0] word;
  logic [8:0]  nwidx;

  assign tdat  = (sst == S_START) || (sst == S_SHIFT && shreg[15]);
  assign nwidx = widx + 1'b1;

  // word nwidx of the message being sent
  always_comb begin
    word = '0;
    case (mtype)
      T_ANODE: word = (nwidx <= 9'(NCH)) ? 16'(latcnt[nwidx - 1]) : ahkpg;
      T_HSKP:  word = (nwidx == 9'd1) ? ahkpg : dhkpg;
      default: word = nextw;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sst <= S_IDLE; mtype <= T_ANODE; anode_pend <= 0; anode_hk <= 0; hk_pend <= 0;
      ebin_pend <= 0; ebin_test <= 0; ebin_sent <= 0; shreg <= '0; bitcnt <= '0;
      widx <= '0; len <= '0; clrcmdpe <= 0;
    end else begin
      clrcmdpe <= 0;
      ebin_sent <= 0;
      if (sampleclk && tlmenb[2] && enbswea) begin
        anode_pend <= 1; anode_hk <= (hskpmd == HK_SWEEP);
      end
      if (hkpgdn && tlmenb[1]) hk_pend <= 1;
      if (cycleclk) begin
        ebin_pend <= tlmenb[0]; ebin_test <= testcyc;
      end
      case (sst)
        S_IDLE: begin
          if (anode_pend) begin
            anode_pend <= 0; mtype <= T_ANODE; sst <= S_START;
            len   <= anode_hk ? 9'(LEN_ANODE_HK) : 9'(LEN_ANODE);
            shreg <= anode_hk ? msg_header(MSG_ANODE_HK, LEN_ANODE_HK)
                              : msg_header(MSG_ANODE, LEN_ANODE);
          end else if (hk_pend) begin
            hk_pend <= 0; mtype <= T_HSKP; sst <= S_START;
            len <= 9'(LEN_HSKP); shreg <= msg_header(MSG_HSKP, LEN_HSKP);
          end else if (ebin_pend && nextv && !cycleclk) begin
            ebin_pend <= 0; mtype <= T_EBIN; sst <= S_START;
            len   <= 9'(NBIN + 1);
            shreg <= msg_header(ebin_test ? MSG_EBIN_TEST : MSG_EBIN, NBIN + 1);
          end
        end
        S_START: begin sst <= S_SHIFT; bitcnt <= 4'd15; widx <= '0; end
        S_SHIFT, S_WAIT: begin
          if (sst == S_SHIFT && bitcnt != 0) begin
            bitcnt <= bitcnt - 1'b1; shreg <= {shreg[14:0], 1'b0};
          end else if (nwidx == len) begin
            sst <= S_IDLE;
            if (mtype == T_EBIN) ebin_sent <= 1;
          end else if (mtype == T_EBIN && !nextv) begin
            sst <= S_WAIT;
          end else begin
            sst <= S_SHIFT; shreg <= word; bitcnt <= 4'd15; widx <= nwidx;
            if (mtype == T_HSKP && nwidx == 9'd2) clrcmdpe <= 1;
          end
        end
        default: ;
      endcase
    end
  end

  // SRAM side: fetch bin words ahead of the serializer, then clear the buffer
  wire take = (sst == S_SHIFT || sst == S_WAIT) && mtype == T_EBIN &&
              !(sst == S_SHIFT && bitcnt != 0) && nwidx != len && nextv;

  always_ff @(posedge clk) begin
    if (rst) begin
      mst <= M_IDLE; fidx <= '0; nextw <= '0; nextv <= 0; clr_idx <= '0;
    end else begin
      if (take) nextv <= 0;
      case (mst)
        M_IDLE: begin
          if (cycleclk) begin
            fidx <= '0; nextv <= 0;
            mst <= tlmenb[0] ? M_FH : M_CLR; clr_idx <= '0;
          end else if (ebin_sent) begin
            mst <= M_CLR; clr_idx <= '0;
          end else if (fidx != 9'(NBIN) && fidx != 0 && (take || !nextv)) begin
            mst <= M_FH;
          end
        end
        M_FH: if (memdn) begin nextw[15:8] <= memdatin; mst <= M_FL; end
        M_FL: if (memdn) begin
                nextw[7:0] <= memdatin; nextv <= 1; fidx <= fidx + 1'b1; mst <= M_IDLE;
              end
        M_CLR: if (memdn) begin
                 if (clr_idx == 10'(2 * NBIN - 1)) mst <= M_IDLE;
                 clr_idx <= clr_idx + 1'b1;
               end
        default: ;
      endcase
    end
  end

  always_comb begin
    memrq = 0; memwr = 0; memadr = '0;
    case (mst)
      M_FH:  begin memrq = 1; memadr = {fidx[7:0], 1'b0}; end
      M_FL:  begin memrq = 1; memadr = {fidx[7:0], 1'b1}; end
      M_CLR: begin memrq = 1; memwr = 1; memadr = clr_idx[8:0]; end
      default: ;
    endcase
  end
endmodule
