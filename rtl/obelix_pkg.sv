// obelix_pkg: types and constants shared by the OBELIX digital periphery.
//
// Holds the hit formats that travel from the end of column to the
// transmitter, the widths of the pixel address and timestamps, the
// command-protocol symbol values and the 8b/10b control characters used by
// the framer. The address and timing field widths (10-bit row, 3-bit column
// in block, 6-bit block, 9-bit Le, 7-bit Te) and the Sync word follow the
// chip specification; the other constants are this design's own choices and
// are marked so below.
package obelix_pkg;

  // ---- pixel address and timing ----
  localparam int unsigned ROW_W    = 10;  // 'row': pixel inside the DC, {row[8:0], column}
  localparam int unsigned COLB_W   = 3;   // 'DC' inside a block of 8 DCs (two trigger groups)
  localparam int unsigned BLOCK_W  = 6;   // 'block'
  localparam int unsigned ADDR_W   = ROW_W + COLB_W + BLOCK_W;  // 19
  localparam int unsigned BCID_W   = 9;   // extended leading-edge timestamp
  localparam int unsigned TE_W     = 7;   // trailing-edge timestamp
  localparam int unsigned LE_PIX_W = 7;   // Le as stored in the pixel (own choice)
  localparam int unsigned PIX_W    = ADDR_W + BCID_W + TE_W;    // 35
  localparam int unsigned PIXF_W   = 40;  // 35 data bits + 5 select bits
  localparam int unsigned CMDF_W   = 24;  // 8-bit cmd_addr + 16-bit register data
  localparam int unsigned TRIG_ID_W = 6;  // {tag, slot} (own choice)

  // Hit as delivered by a double column to its end of column.
  typedef struct packed {
    logic [ROW_W-1:0]    row;
    logic                col;    // left/right column of the double column
    logic [LE_PIX_W-1:0] le;
    logic [TE_W-1:0]     te;
  } dc_hit_t;

  // Hit after the end of column (Le extended to 9 bits).
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic              col;
    logic [BCID_W-1:0] le;
    logic [TE_W-1:0]   te;
  } eoc_hit_t;

  // Hit inside a trigger group: pixel inside the DC and DC inside the block.
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [COLB_W-1:0] colb;
    logic [BCID_W-1:0] le;
    logic [TE_W-1:0]   te;
  } trg_hit_t;

  // 35-bit pixel word sent off chip: address (pixel in DC, DC in block, block) + timing.
  typedef struct packed {
    logic [ROW_W-1:0]   row;
    logic [COLB_W-1:0]  colb;
    logic [BLOCK_W-1:0] block;
    logic [BCID_W-1:0]  le;
    logic [TE_W-1:0]    te;
  } pix_word_t;

  // Entry of the transmit FIFO: command readback or pixel data.
  typedef struct packed {
    logic              is_cmd;
    logic [PIXF_W-1:0] data;   // pixel: 5 x {select, 7 data}; command: low 24 bits
  } txf_word_t;

  // Position of a hit's leading edge relative to the delayed BCID
  // (bcid - latency), modulo 2^BCID_W: a hit is 'waiting' while its Le is
  // 1..255 cycles ahead, 'due' in the cycle they are equal (the end of its
  // latency, when a trigger for it arrives) and expired otherwise.
  function automatic logic le_waiting(input logic [BCID_W-1:0] le, input logic [BCID_W-1:0] bcid_dly);
    logic [BCID_W-1:0] d;
    d = le - bcid_dly;
    return (d != '0) && !d[BCID_W-1];
  endfunction

  // ---- command protocol (RD53B symbol values) ----
  localparam logic [15:0] SYNC_WORD  = 16'h817E;  // '10000001 01111110'
  localparam logic [15:0] PLL_LOCK   = 16'hAAAA;
  localparam logic [15:0] NOOP_WORD  = 16'h6969;
  localparam logic [7:0]  CMD_CLEAR  = 8'h5A;
  localparam logic [7:0]  CMD_GPULSE = 8'h5C;
  localparam logic [7:0]  CMD_CAL    = 8'h63;
  localparam logic [7:0]  CMD_WRREG  = 8'h66;
  localparam logic [7:0]  CMD_RDREG  = 8'h65;

  // Trigger symbol -> 4-bit bunch-crossing pattern (0 = not a trigger symbol).
  function automatic logic [3:0] trig_symbol(input logic [7:0] s);
    case (s)
      8'h2B: return 4'd1;   8'h2D: return 4'd2;   8'h2E: return 4'd3;
      8'h33: return 4'd4;   8'h35: return 4'd5;   8'h36: return 4'd6;
      8'h39: return 4'd7;   8'h3A: return 4'd8;   8'h3C: return 4'd9;
      8'h4B: return 4'd10;  8'h4D: return 4'd11;  8'h4E: return 4'd12;
      8'h53: return 4'd13;  8'h55: return 4'd14;  8'h56: return 4'd15;
      default: return 4'd0;
    endcase
  endfunction

  // Data symbol -> {valid, 5-bit value}.
  function automatic logic [5:0] data_symbol(input logic [7:0] s);
    case (s)
      8'h6A: return {1'b1, 5'd0};   8'h6C: return {1'b1, 5'd1};
      8'h71: return {1'b1, 5'd2};   8'h72: return {1'b1, 5'd3};
      8'h74: return {1'b1, 5'd4};   8'h8B: return {1'b1, 5'd5};
      8'h8D: return {1'b1, 5'd6};   8'h8E: return {1'b1, 5'd7};
      8'h93: return {1'b1, 5'd8};   8'h95: return {1'b1, 5'd9};
      8'h96: return {1'b1, 5'd10};  8'h99: return {1'b1, 5'd11};
      8'h9A: return {1'b1, 5'd12};  8'h9C: return {1'b1, 5'd13};
      8'hA3: return {1'b1, 5'd14};  8'hA5: return {1'b1, 5'd15};
      8'hA6: return {1'b1, 5'd16};  8'hA9: return {1'b1, 5'd17};
      8'h59: return {1'b1, 5'd18};  8'hAC: return {1'b1, 5'd19};
      8'hB1: return {1'b1, 5'd20};  8'hB2: return {1'b1, 5'd21};
      8'hB4: return {1'b1, 5'd22};  8'hC3: return {1'b1, 5'd23};
      8'hC5: return {1'b1, 5'd24};  8'hC6: return {1'b1, 5'd25};
      8'hC9: return {1'b1, 5'd26};  8'hCA: return {1'b1, 5'd27};
      8'hCC: return {1'b1, 5'd28};  8'hD1: return {1'b1, 5'd29};
      8'hD2: return {1'b1, 5'd30};  8'hD4: return {1'b1, 5'd31};
      default: return 6'd0;
    endcase
  endfunction

  // ---- 8b/10b control characters (K28.y: byte value 8'hxx) ----
  localparam logic [7:0] K28_1 = 8'h3C;  // IDLE
  localparam logic [7:0] K28_2 = 8'h5C;  // SOF_C (own choice)
  localparam logic [7:0] K28_3 = 8'h7C;  // EOF_C (own choice)
  localparam logic [7:0] K28_4 = 8'h9C;  // EOF_H (own choice)
  localparam logic [7:0] K28_6 = 8'hDC;  // SOF_H (own choice)

  // ---- configuration register map (own choice) ----
  localparam int unsigned REG_LATENCY = 0;  // trigger latency in BCID cycles
  localparam int unsigned REG_CTRL    = 1;  // bit0 trigger enable, bit1 hit enable
  localparam logic [15:0] LATENCY_DEFAULT = 16'd100;
  localparam logic [15:0] CTRL_DEFAULT    = 16'h0003;

endpackage
