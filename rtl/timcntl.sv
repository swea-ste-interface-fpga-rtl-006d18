// TIMCNTL: timing generator.
// All strobes are one CLK1M cycle wide and registered.
//   CYCLECLK     : on each 1 s tick whose seconds count is even (SECS0 = 0),
//                  i.e. every 2 s.
//   STEPCLK      : with CYCLECLK and then every STEP_CLKS clocks for the first
//                  NSTEPS intervals (1344 x 1.45 ms = 1948.8 ms); the last,
//                  1345th interval runs until the next CYCLECLK (51.2 ms).
//   SAMPLECLK    : every SAMPLE_DIV-th STEPCLK within the NSTEPS intervals,
//                  restarting with CYCLECLK; SAMPLECNT counts SAMPLECLKs and is
//                  cleared by CYCLECLK.
//   TESTCYCLECLK : every TEST_DIV-th CYCLECLK (10 s).
//   HSKPMD       : toggles on every CYCLECLK.
//   DOHSKP       : DOHSKP_N ticks per CYCLECLK, DOHSKP_CLKS apart, the first one
//                  with CYCLECLK.
//   SYN100K/N    : CLK1M divided by SYN_DIV (100 kHz), 50 % duty, and inverse.
// The interval counts and divisors are the specification's; aligning the first
// SAMPLECLK and DOHSKP with CYCLECLK, the one-cycle strobe form and counting
// the first CYCLECLK after reset as the start of a test cycle are this design's choices.
module timcntl #(
  parameter int unsigned STEP_CLKS   = 1450,
  parameter int unsigned NSTEPS      = 1344,
  parameter int unsigned SAMPLE_DIV  = 4,
  parameter int unsigned TEST_DIV    = 5,
  parameter int unsigned DOHSKP_CLKS = 125000,
  parameter int unsigned DOHSKP_N    = 16,
  parameter int unsigned SYN_DIV     = 10
) (
  input  logic       clk,          // CLK1M
  input  logic       rst,
  input  logic       tk1s,         // TK1S: 1 s tick (one-cycle pulse)
  input  logic       secs0,        // SECS[0] of the seconds count
  output logic       cycleclk,
  output logic       stepclk,
  output logic       sampleclk,
  output logic [8:0] samplecnt,
  output logic       testcycleclk,
  output logic       hskpmd,
  output logic       dohskp,
  output logic       syn100k,
  output logic       syn100kn
);
  localparam int unsigned SW = $clog2(STEP_CLKS);
  localparam int unsigned NW = $clog2(NSTEPS + 1);
  localparam int unsigned DW = $clog2(DOHSKP_CLKS);
  localparam int unsigned YW = $clog2(SYN_DIV);

  logic          cyc_ev;
  logic [SW-1:0] step_tmr;
  logic [NW-1:0] step_idx;      // STEPCLKs issued in this cycle
  logic [1:0]    samp_div;
  logic [$clog2(TEST_DIV)-1:0] test_cnt;
  logic [DW-1:0] hk_tmr;
  logic [4:0]    hk_cnt;
  logic [YW-1:0] syn_cnt;
  logic          started;       // a CYCLECLK has occurred since reset

  assign cyc_ev = tk1s & ~secs0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cycleclk <= 0; stepclk <= 0; sampleclk <= 0; samplecnt <= '0;
      testcycleclk <= 0; hskpmd <= 0; dohskp <= 0;
      step_tmr <= '0; step_idx <= NW'(NSTEPS); samp_div <= '0; test_cnt <= '0;
      hk_tmr <= '0; hk_cnt <= 5'(DOHSKP_N); started <= 0;
    end else begin
      cycleclk <= cyc_ev;
      stepclk <= 0; sampleclk <= 0; testcycleclk <= 0; dohskp <= 0;
      if (cyc_ev) begin
        started   <= 1;
        hskpmd    <= ~hskpmd;
        stepclk   <= 1;
        sampleclk <= 1;
        samplecnt <= '0;
        step_tmr  <= '0;
        step_idx  <= NW'(1);
        samp_div  <= 2'd0;
        dohskp    <= 1;
        hk_tmr    <= '0;
        hk_cnt    <= 5'd1;
        if (!started || test_cnt == $bits(test_cnt)'(TEST_DIV - 1)) begin
          testcycleclk <= 1; test_cnt <= '0;
        end else test_cnt <= test_cnt + 1'b1;
      end else begin
        // step intervals
        if (step_idx < NW'(NSTEPS + 1)) begin
          if (step_tmr == SW'(STEP_CLKS - 1)) begin
            step_tmr <= '0;
            if (step_idx <= NW'(NSTEPS)) begin
              stepclk  <= 1;
              step_idx <= step_idx + 1'b1;
              if (step_idx < NW'(NSTEPS)) begin
                if (samp_div == 2'(SAMPLE_DIV - 1)) begin
                  samp_div <= '0; sampleclk <= 1; samplecnt <= samplecnt + 1'b1;
                end else samp_div <= samp_div + 1'b1;
              end
            end
          end else step_tmr <= step_tmr + 1'b1;
        end
        // housekeeping ticks
        if (hk_cnt < 5'(DOHSKP_N)) begin
          if (hk_tmr == DW'(DOHSKP_CLKS - 1)) begin
            hk_tmr <= '0; dohskp <= 1; hk_cnt <= hk_cnt + 1'b1;
          end else hk_tmr <= hk_tmr + 1'b1;
        end
      end
    end
  end

  // 100 kHz reference runs from reset, independent of the cycle timing
  always_ff @(posedge clk) begin
    if (rst) begin
      syn_cnt <= '0; syn100k <= 0; syn100kn <= 1;
    end else begin
      syn_cnt <= (syn_cnt == YW'(SYN_DIV - 1)) ? '0 : syn_cnt + 1'b1;
      syn100k  <= (syn_cnt < YW'(SYN_DIV / 2));
      syn100kn <= ~(syn_cnt < YW'(SYN_DIV / 2));
    end
  end
endmodule
