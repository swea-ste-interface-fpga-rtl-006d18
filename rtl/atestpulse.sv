// ATESTPULSE: SWEA anode test pulser.
// Produces a square wave whose half period is DIV CLK1M cycles. DIV is set to
// START_DIV at every CYCLECLK and incremented at every SAMPLECLK, so the
// frequency starts at its highest value (CLK1M / 2 = 500 kHz, the simpler of
// the two top frequencies the specification allows) and steps down through
// the cycle. The output is held low, and the pulser in reset, while the SWEA
// (ENBSWEA) or the SWEA test pulser (ENBSWEATP) is disabled.
module atestpulse #(
  parameter int unsigned START_DIV = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic enbswea,
  input  logic enbsweatp,
  input  logic cycleclk,
  input  logic sampleclk,
  output logic testpulse
);
  logic [8:0] div, cnt;
  wire hold = rst | ~enbswea | ~enbsweatp;

  always_ff @(posedge clk) begin
    if (hold) begin
      div <= 9'(START_DIV); cnt <= '0; testpulse <= 0;
    end else begin
      if (cycleclk) begin
        div <= 9'(START_DIV); cnt <= '0; testpulse <= 0;
      end else begin
        if (sampleclk && div != '1) div <= div + 1'b1;
        if (cnt + 1'b1 >= div) begin
          cnt <= '0; testpulse <= ~testpulse;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
