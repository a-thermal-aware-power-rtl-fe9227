// tapm_pkg: shared constants and types of the thermal-aware power management
// (TAPM) IP.
//
// It holds the TMU command byte layout, register reset values and the number of
// sensors/controllers. The reset values (TEMP 00H, FAN 7FH, THRES 3C00H,
// OFFS_THRES 0A0AH, CONFIG FFH) and the count of four sensors and four
// multi-level controllers follow the prototype. The command byte encoding and
// the bit layout of CONFIG and REPORT0/1 are this design's own choice:
//
//   command byte  [7]   1 = read command, 0 = write command
//                 [6:4] register kind (see tmu_kind_e)
//                 [3:2] must be 00
//                 [1:0] register index (sensor / controller number)
//
//   CONFIG        [3:0] local-threshold monitoring enable of sensor 3..0
//                 [7:4] offset-threshold monitoring enable of sensor 3..0
//   REPORT0       [3:0] local underflow of sensor 3..0 (TEMP < low threshold)
//                 [7:4] local overflow  of sensor 3..0 (TEMP > high threshold)
//   REPORT1       [3:0] offset underflow of sensor 3..0
//                 [7:4] offset overflow  of sensor 3..0
//
// 16-bit registers are sent low byte first, as an SMBus word is:
// THRESn = {high threshold, low threshold}, OFFS_THRES = {offset high, offset low}.
package tapm_pkg;

  localparam int unsigned NSENS = 4;  // temperature sensors / MLCs on the prototype

  typedef enum logic [2:0] {
    KIND_CONFIG = 3'd0,  // CONFIG, 1 byte, read/write
    KIND_REPORT = 3'd1,  // REPORT0/REPORT1, 1 byte, read only
    KIND_FAN    = 3'd2,  // FAN0..3 (MLC drive value), 1 byte, read/write
    KIND_TEMP   = 3'd3,  // TEMP0..3, 1 byte, read only
    KIND_THRES  = 3'd4,  // THRES0..3, 2 bytes, read/write
    KIND_OFFS   = 3'd5   // OFFS_THRES, 2 bytes, read/write
  } tmu_kind_e;

  typedef struct packed {
    logic      rd;     // read command
    tmu_kind_e kind;
    logic [1:0] zero;  // reserved, 00 in a valid command
    logic [1:0] idx;
  } tmu_cmd_t;

  localparam logic [7:0]  RST_TEMP   = 8'h00;
  localparam logic [7:0]  RST_FAN    = 8'h7f;
  localparam logic [15:0] RST_THRES  = 16'h3c00;
  localparam logic [15:0] RST_OFFS   = 16'h0a0a;
  localparam logic [7:0]  RST_CONFIG = 8'hff;

  // Builds a command byte.
  function automatic logic [7:0] tmu_cmd(input logic rd, input tmu_kind_e kind,
                                         input logic [1:0] idx);
    tmu_cmd_t c;
    c.rd   = rd;
    c.kind = kind;
    c.zero = 2'b00;
    c.idx  = idx;
    return c;
  endfunction

  // Number of data bytes a register holds, 0 for an undefined command.
  function automatic int unsigned tmu_cmd_len(input tmu_cmd_t c);
    if (c.zero != 2'b00) return 0;
    case (c.kind)
      KIND_CONFIG: return (c.idx == 2'd0) ? 1 : 0;
      KIND_REPORT: return (c.idx[1] == 1'b0 && c.rd) ? 1 : 0;
      KIND_FAN:    return 1;
      KIND_TEMP:   return c.rd ? 1 : 0;
      KIND_THRES:  return 2;
      KIND_OFFS:   return (c.idx == 2'd0) ? 2 : 0;
      default:     return 0;
    endcase
  endfunction

endpackage
