// Shared constants and types of the SWEA/STE interface FPGA (SIF).
// Command identifiers and telemetry message identifiers are the values of
// the command and message tables; the SRAM memory map, the header layout and
// the housekeeping-mode encoding are this design's own choices.
package sif_pkg;

  // Command identifiers (upper byte of a 24-bit command word).
  typedef enum logic [7:0] {
    CMD_BUFSEL   = 8'hE0,  // SRAM buffer select
    CMD_MCPDAC   = 8'hE1,  // MCP DAC load
    CMD_CONTROL  = 8'hE2,  // controls / enables
    CMD_ACTUATOR = 8'hE3,  // cover actuator enables
    CMD_OPHTR    = 8'hE4,  // operational heater PWM value
    CMD_TDAC     = 8'hE5,  // threshold DAC load
    CMD_ARM      = 8'hE6,  // arm force STE cover actuators
    CMD_HSKPSEL  = 8'hE7,  // sweep housekeeping channel select
    CMD_SLUTADR  = 8'hE8,  // sweep LUT address pointer write
    CMD_SLUTDAT  = 8'hE9,  // sweep LUT data word write
    CMD_ELUTADR  = 8'hEA,  // energy LUT address pointer write
    CMD_ELUTDAT  = 8'hEB,  // energy LUT data word write
    CMD_TIME     = 8'hF0   // time message: one per second, D[0] = seconds bit 0
  } cmd_id_e;

  // Telemetry message identifiers and lengths in 16-bit words, header included.
  localparam logic [7:0] MSG_ANODE      = 8'hC0;
  localparam logic [7:0] MSG_ANODE_HK   = 8'hC1;
  localparam logic [7:0] MSG_EBIN       = 8'hC2;
  localparam logic [7:0] MSG_EBIN_TEST  = 8'hC3;
  localparam logic [7:0] MSG_HSKP       = 8'hC4;
  localparam int unsigned LEN_ANODE    = 17;
  localparam int unsigned LEN_ANODE_HK = 18;
  localparam int unsigned LEN_EBIN     = 257;
  localparam int unsigned LEN_HSKP     = 3;

  // Header word: message ID in the upper 6 bits, length in the lower 10.
  function automatic logic [15:0] msg_header(logic [7:0] id, int unsigned len);
    return {id[5:0], 10'(len)};
  endfunction

  // Housekeeping modes (HSKPMD).
  typedef enum logic {HK_CYCLING = 1'b0, HK_SWEEP = 1'b1} hk_mode_e;

  // SRAM regions (512K x 8, 19-bit byte address).
  //   energy LUT  : {3'b000, buf, addr[14:0]}
  //   sweep LUT   : {3'b001, buf, 2'b00, addr[12:0]}
  //   accumulator : {3'b010, buf, 6'b0, addr[8:0]}
  typedef enum logic [1:0] {RGN_ELUT = 2'd0, RGN_SLUT = 2'd1, RGN_ACC = 2'd2} mem_region_e;

  function automatic logic [18:0] sram_addr(mem_region_e rgn, logic bufsel, logic [14:0] a);
    case (rgn)
      RGN_ELUT: return {3'b000, bufsel, a[14:0]};
      RGN_SLUT: return {3'b001, bufsel, 2'b00, a[12:0]};
      default:  return {3'b010, bufsel, 6'b0, a[8:0]};
    endcase
  endfunction

endpackage
