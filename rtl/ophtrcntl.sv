// OPHTRCNTL: operational heater pulse-width modulator.
// A command strobe loads the lower nibble of the command data as PWM_VALUE;
// values above 10 are replaced by zero. The output is high for PWM_VALUE
// clocks out of every PERIOD clocks (1 us clocks, 10 us period), so 0 keeps it
// low and 10 keeps it high. The new value takes effect at the start of the
// next period. PWM_VALUE is cleared by reset.
module ophtrcntl #(
  parameter int unsigned PERIOD = 10   // PWM period in CLK1M cycles
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_lat,   // OPHTRCMDLAT: command E4 received
  input  logic [15:0] cmd_dat,   // CMDDAT
  output logic        pulse_out  // OPHTRPULSE
);
  logic [3:0] value, active;
  logic [$clog2(PERIOD)-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= '0; active <= '0; phase <= '0; pulse_out <= 1'b0;
    end else begin
      if (cmd_lat) value <= (cmd_dat[3:0] > 4'(PERIOD)) ? 4'd0 : cmd_dat[3:0];
      if (phase == $bits(phase)'(PERIOD - 1)) phase <= '0;
      else                                    phase <= phase + 1'b1;
      if (phase == '0) begin
        active    <= value;
        pulse_out <= (value != 0);
      end else begin
        pulse_out <= (4'(phase) < active);
      end
    end
  end
endmodule
