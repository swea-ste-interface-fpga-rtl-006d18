// DACWRCNTL: arbiter and write sequencer for the common 8-bit DAC bus.
// Three clients request byte writes: the sweep controller (four DACs chosen
// one-hot by SWDACID), the MCP DAC controller and the STE test pulser DAC.
// Requests are served on fixed priority, sweep > MCP > STE pulser (the
// specification asks for a fixed priority but leaves the order open; the sweep
// has the tightest deadline). Handshake: a client holds RQ, byte select and
// data until its WRDN pulse. A write takes two CLK1M cycles: in the first the
// request is granted and the bus registers load, in the second the one-hot
// write strobe DACWR[5:0] is high with address/byte-select/data stable and the
// client sees WRDN. DACWR bits: [3:0] sweep DACs, [4] MCP DAC, [5] STE test
// pulser DAC (this design's numbering). DACCLR, the common clear of all DACs,
// follows the reset input, which the top drives from power-on reset and AFEPWR.
module dacwrcntl (
  input  logic       clk,
  input  logic       rst,
  input  logic       swdacrq,
  input  logic [3:0] swdacid,
  input  logic       swdacbsel,
  input  logic [7:0] swdacdat,
  input  logic       mcpdacrq,
  input  logic       mcpdacbsel,
  input  logic [7:0] mcpdacdat,
  input  logic       pulsedacrq,
  input  logic       pulsedacbsel,
  input  logic [7:0] pulsedacdat,
  output logic       swdacwrdn,
  output logic       mcpdacwrdn,
  output logic       pulsedacwrdn,
  output logic       dacclr,
  output logic       dacbsel,
  output logic [5:0] dacwr,
  output logic [7:0] dacdat
);
  typedef enum logic [1:0] {G_NONE, G_SW, G_MCP, G_PULSE} gnt_e;
  gnt_e gnt;
  logic [5:0] sel;

  assign dacclr       = rst;
  assign swdacwrdn    = (gnt == G_SW);
  assign mcpdacwrdn   = (gnt == G_MCP);
  assign pulsedacwrdn = (gnt == G_PULSE);
  assign dacwr        = (gnt != G_NONE) ? sel : 6'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt <= G_NONE; sel <= '0; dacbsel <= 0; dacdat <= '0;
    end else if (gnt != G_NONE) begin
      gnt <= G_NONE;
    end else if (swdacrq) begin
      gnt <= G_SW;    sel <= {2'b00, swdacid};  dacbsel <= swdacbsel;    dacdat <= swdacdat;
    end else if (mcpdacrq) begin
      gnt <= G_MCP;   sel <= 6'b010000;         dacbsel <= mcpdacbsel;   dacdat <= mcpdacdat;
    end else if (pulsedacrq) begin
      gnt <= G_PULSE; sel <= 6'b100000;         dacbsel <= pulsedacbsel; dacdat <= pulsedacdat;
    end
  end

  // a client keeps its request up until it has been served
  a_sw_hold: assert property (@(posedge clk) disable iff (rst)
    swdacrq && !swdacwrdn |=> swdacrq);
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(dacwr));
endmodule
