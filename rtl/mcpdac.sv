// MCPDAC: MCP high-voltage DAC control.
// On the MCP DAC load strobe the 8-bit value CMDDAT[7:0] is captured and
// written over the DAC bus into the upper byte (byte select = 1) of the MCP
// DAC. The lower byte is only ever cleared by the common DAC clear. At the
// next CYCLECLK after the write the latch strobe DACLAT (DAC4LAT) is pulsed
// for one cycle, moving the value to the DAC output. The block is held in
// reset while ENBSWEA is low (the top also resets it while AFEPWR is off).
// A load that arrives while a write is still waiting replaces the value.
module mcpdac (
  input  logic        clk,
  input  logic        rst,
  input  logic        enbswea,
  input  logic        mcp_cmdlat,
  input  logic [15:0] cmd_dat,
  input  logic        cycleclk,
  input  logic        dacwrdn,
  output logic        dacwrrq,
  output logic        dacbytesel,
  output logic [7:0]  dacdat,
  output logic        daclat
);
  logic pending_lat;
  wire hold = rst | ~enbswea;

  assign dacbytesel = 1'b1;

  always_ff @(posedge clk) begin
    if (hold) begin
      dacwrrq <= 0; dacdat <= '0; daclat <= 0; pending_lat <= 0;
    end else begin
      daclat <= 0;
      if (mcp_cmdlat) begin
        dacdat <= cmd_dat[7:0]; dacwrrq <= 1;
      end else if (dacwrdn) begin
        dacwrrq <= 0; pending_lat <= 1;
      end
      if (cycleclk && pending_lat && !dacwrrq) begin
        daclat <= 1; pending_lat <= 0;
      end
    end
  end
endmodule
