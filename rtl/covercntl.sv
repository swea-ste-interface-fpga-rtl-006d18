// COVERCNTL: cover actuator switch control.
// SWEA one-time cover: the switch follows the commanded SWEACOVON level.
// STE reclosable cover, per direction i (0 = open/out, 1 = close/in): a
// command that raises STECOVON[i] powers the actuator switch STECOVSW[i] until
// the status input STECOVSTAT[i] reports the position reached; a command that
// clears STECOVON[i] removes power at once. FORSTECOVON[i] powers the switch
// regardless of the status. The two switches are never on together: if both
// directions are requested, neither is driven. Outputs are registered (one
// CLK1M cycle). STECOVSTAT[i] = 1 meaning "position i reached" is this
// design's choice; the specification does not give the status polarity.
module covercntl (
  input  logic       clk,
  input  logic       rst,
  input  logic       sweacovon,
  input  logic [1:0] stecovon,
  input  logic [1:0] forstecovon,
  input  logic [1:0] stecovstat,
  output logic       sweacovsw,
  output logic [1:0] stecovsw
);
  logic [1:0] on_q, run;
  logic [1:0] nxt;

  always_comb begin
    for (int i = 0; i < 2; i++)
      nxt[i] = forstecovon[i] |
               (stecovon[i] & (run[i] | ~on_q[i]) & ~stecovstat[i]);
    if (nxt == 2'b11) nxt = 2'b00;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sweacovsw <= 0; stecovsw <= '0; on_q <= '0; run <= '0;
    end else begin
      sweacovsw <= sweacovon;
      on_q      <= stecovon;
      for (int i = 0; i < 2; i++)
        run[i] <= stecovon[i] & (run[i] | ~on_q[i]) & ~stecovstat[i];
      stecovsw  <= nxt;
    end
  end
endmodule
