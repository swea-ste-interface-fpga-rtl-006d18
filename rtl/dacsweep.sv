// DACSWEEP: SWEA/STE sweep DAC controller.
// The four sweep DACs step through a table held in the sweep LUT region of
// SRAM once per 2 s cycle. At each STEPCLK the values written during the
// previous interval are moved to the DAC outputs by SWDACLAT (asserted
// combinationally in the STEPCLK cycle), and the values of the following step
// are fetched: for each DAC and byte one SRAM read through MEMCNTL, then one
// write over the DAC bus through DACWRCNTL. The step index restarts at
// CYCLECLK: step 0 is latched at CYCLECLK, so its values are fetched during
// the last (51.2 ms) interval of the previous cycle. The LUT is flat: the byte
// for step s, DAC d, byte b is at address (s*NDAC + d)*SW_BYTES + b, high
// byte first. With the default SW_BYTES = 1 (8-bit values, byte select 0) a
// step needs four reads; SW_BYTES = 2 gives the eight reads per step that the
// specification names as the maximum, but then only 1024 steps fit the 8 KB
// table. DACID is one-hot. Held in reset while ENBSWEA is low.
module dacsweep #(
  parameter int unsigned NDAC     = 4,
  parameter int unsigned NSTEPS   = 1345,   // steps per cycle, last one included
  parameter int unsigned SW_BYTES = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enbswea,
  input  logic        stepclk,
  input  logic        cycleclk,
  // SRAM client
  output logic        memrdrq,
  output logic [12:0] memadr,
  input  logic        memrddn,
  input  logic [7:0]  memdatin,
  // DAC bus client
  output logic        dacwrrq,
  output logic [3:0]  dacid,
  output logic        dacbytesel,
  output logic [7:0]  dacdat,
  input  logic        dacwrdn,
  output logic        daclat      // SWDACLAT
);
  localparam int unsigned NB = NDAC * SW_BYTES;
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} st_e;

  st_e st;
  logic [10:0] cur;            // step being latched now
  logic [10:0] nxt;            // step being fetched
  logic [3:0]  k;              // byte within the step
  wire hold = rst | ~enbswea;

  assign daclat = stepclk & ~hold;
  assign memadr = 13'(nxt * NB + k);
  assign memrdrq = (st == S_RD);
  assign dacwrrq = (st == S_WR);
  assign dacid   = 4'(1 << (32'(k) / SW_BYTES));
  assign dacbytesel = (SW_BYTES == 2) ? ~k[0] : 1'b0;

  function automatic logic [10:0] after(logic [10:0] s);
    return (s == 11'(NSTEPS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (hold) begin
      st <= S_IDLE; cur <= '0; nxt <= '0; k <= '0; dacdat <= '0;
    end else begin
      if (stepclk) begin
        automatic logic [10:0] c = cycleclk ? 11'd0 : after(cur);
        cur <= c; nxt <= after(c); k <= '0; st <= S_RD;
      end else begin
        case (st)
          S_RD: if (memrddn) begin dacdat <= memdatin; st <= S_WR; end
          S_WR: if (dacwrdn) begin
                  if (k == 4'(NB - 1)) st <= S_IDLE;
                  else begin k <= k + 1'b1; st <= S_RD; end
                end
          default: ;
        endcase
      end
    end
  end
endmodule
