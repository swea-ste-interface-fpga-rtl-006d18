// TDACS: four 6-bit threshold DAC registers (A-D) driving on-board DACs.
// A threshold DAC load strobe writes CMDDAT[5:0] into the staging register
// selected by CMDDAT[7:6] (0 = A ... 3 = D). With STAGED = 1 (default, as the
// specification states, marked to be reviewed) the four outputs copy the
// staging registers at the next CYCLECLK; with STAGED = 0 they update one
// clock after the strobe. All registers are zero after reset.
module tdacs #(
  parameter bit STAGED = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tdac_cmdlat,   // TDACCMDLAT
  input  logic [15:0] cmd_dat,       // CMDDAT
  input  logic        cycleclk,
  output logic [5:0]  tdac [4]       // TDACA..TDACD
);
  logic [5:0] stage [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin stage[i] <= '0; tdac[i] <= '0; end
    end else begin
      if (tdac_cmdlat) begin
        stage[cmd_dat[7:6]] <= cmd_dat[5:0];
        if (!STAGED) tdac[cmd_dat[7:6]] <= cmd_dat[5:0];
      end
      if (STAGED && cycleclk)
        for (int i = 0; i < 4; i++) tdac[i] <= stage[i];
    end
  end
endmodule
