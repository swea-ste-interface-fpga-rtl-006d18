// LATCHUPPROT: analog front-end power control.
// AFEPWR follows the truth table of the latch-up protection: a force-off
// command always removes power, an overcurrent shutdown (AFESHDN = 1)
// removes power unless force-on is set, otherwise power is on. The output is
// registered on CLK1M, so it is held low while reset is asserted and may rise
// one clock after reset is released. AFESHDN is taken as active high and is
// not latched; both are this design's reading of points the specification
// left open.
module latchupprot (
  input  logic clk,         // CLK1M
  input  logic rst,         // synchronous power-on reset, active high
  input  logic afeshdn,     // external overcurrent detect, 1 = shut down
  input  logic afepwr_fon,  // commanded AFEPWR force on
  input  logic afepwr_foff, // commanded AFEPWR force off
  output logic afepwr       // 1 = analog supplies on
);
  always_ff @(posedge clk) begin
    if (rst) afepwr <= 1'b0;
    else     afepwr <= ~afepwr_foff & (~afeshdn | afepwr_fon);
  end
endmodule
