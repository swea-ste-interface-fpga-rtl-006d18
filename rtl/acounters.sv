// ACOUNTERS: sixteen SWEA anode counters with holding registers.
// Anode pulses (250-300 ns) are shorter than a CLK1M period, so each anode
// input clocks its own 14-bit counter directly and rising edges are counted;
// a counter stops at its maximum instead of wrapping (this design's choice).
// At SAMPLECLK the sixteen counts are copied into holding registers LATxCNT
// in the CLK1M domain, and during the following CLK1M cycle the counters are
// cleared asynchronously; pulses in that window are lost (about 1 us of
// dead time per sample). The holding registers are read by the telemetry
// manager. The block is held in reset while ENBSWEA is low; the top also
// resets it while AFEPWR is off.
// Circuit note: the counter clocks are the anode inputs, a deliberate second
// clock domain; the copy at SAMPLECLK may catch a counter in mid-increment,
// as the specification accepts.
module acounters #(
  parameter int unsigned NCH = 16,
  parameter int unsigned CW  = 14
) (
  input  logic          clk,        // CLK1M
  input  logic          rst,
  input  logic          enbswea,
  input  logic          sampleclk,
  input  logic [NCH-1:0] apulse,    // anode pulses
  output logic [CW-1:0] latcnt [NCH] // LAT0CNT..LATFCNT holding registers
);
  logic [CW-1:0] cnt [NCH];
  logic          clr;
  wire hold = rst | ~enbswea;

  for (genvar i = 0; i < NCH; i++) begin : g_cnt
    logic [CW-1:0] c;
    always_ff @(posedge apulse[i] or posedge clr) begin
      if (clr)         c <= '0;
      else if (c != '1) c <= c + 1'b1;
    end
    assign cnt[i] = c;
  end

  always_ff @(posedge clk) begin
    if (hold) begin
      clr <= 1;
      for (int i = 0; i < NCH; i++) latcnt[i] <= '0;
    end else begin
      clr <= sampleclk;
      if (sampleclk)
        for (int i = 0; i < NCH; i++) latcnt[i] <= cnt[i];
    end
  end
endmodule
