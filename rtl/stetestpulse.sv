// STETESTPULSE: STE test pulser with its own 16-bit ramp DAC.
// While enabled (ENBSTETP), a TESTCYCLECLK starts a ramp: every STEP_CLKS
// cycles (100 us) an active-low test pulse of PULSE_CLKS cycles (10 us) is
// issued, and when the pulse ends the DAC value is incremented by one and
// written over the shared DAC bus as two bytes (low byte with byte select 0,
// then high byte with byte select 1), followed by a one-cycle DACLAT
// (DAC5LAT) strobe. When the value has reached DAC_MAX the DAC is written
// back to zero and the pulses stop until the next TESTCYCLECLK. The pulse
// timing, ramp length and restart rule are the specification's; the byte
// order and the pulse-then-write order within one step are this design's.
// Disabled or in reset, the output is high (inactive) and the ramp stops.
module stetestpulse #(
  parameter int unsigned STEP_CLKS  = 100,
  parameter int unsigned PULSE_CLKS = 10,
  parameter int unsigned DAC_BITS   = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enbstetp,
  input  logic       testcycleclk,
  input  logic       dacwrdn,
  output logic       dacwrrq,
  output logic       dacbytesel,
  output logic [7:0] dacdat,
  output logic       daclat,
  output logic       testpulse_n    // STETESTPULSE, active low
);
  localparam logic [DAC_BITS-1:0] DAC_MAX = '1;
  typedef enum logic [1:0] {W_IDLE, W_LO, W_HI} wr_e;

  logic                 active;
  logic [DAC_BITS-1:0]  value;
  logic [15:0]          wval;
  logic [$clog2(STEP_CLKS)-1:0] tmr;
  wr_e                  wst;
  wire hold = rst | ~enbstetp;

  assign dacdat = dacbytesel ? wval[15:8] : wval[7:0];

  always_ff @(posedge clk) begin
    if (hold) begin
      active <= 0; value <= '0; wval <= '0; tmr <= '0; wst <= W_IDLE;
      dacwrrq <= 0; dacbytesel <= 0; daclat <= 0; testpulse_n <= 1;
    end else begin
      daclat <= 0;
      if (testcycleclk) begin
        active <= 1; value <= '0; tmr <= '0; testpulse_n <= 0;
      end else if (active) begin
        tmr <= (tmr == $bits(tmr)'(STEP_CLKS - 1)) ? '0 : tmr + 1'b1;
        testpulse_n <= !(tmr == $bits(tmr)'(STEP_CLKS - 1) || tmr < $bits(tmr)'(PULSE_CLKS - 1));
        if (tmr == $bits(tmr)'(PULSE_CLKS - 1)) begin
          if (value == DAC_MAX) begin
            value <= '0; wval <= '0; active <= 0; testpulse_n <= 1;
          end else begin
            value <= value + 1'b1; wval <= 16'(value + 1'b1);
          end
          wst <= W_LO; dacwrrq <= 1; dacbytesel <= 0;
        end
      end
      case (wst)
        W_LO: if (dacwrdn) begin wst <= W_HI; dacbytesel <= 1; end
        W_HI: if (dacwrdn) begin wst <= W_IDLE; dacwrrq <= 0; daclat <= 1; end
        default: ;
      endcase
    end
  end
endmodule
