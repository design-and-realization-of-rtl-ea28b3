// swir_pkg: constants and types shared by the SWIR acquisition pipeline.
//
// Holds the 525-line BT.656 (CCIR656) frame geometry used by the video
// side (line length, blanking, field and active-line numbers, fill and
// chroma values, the EAV/SAV status word) and the SDRAM command encoding.
// Line numbers are 1-based as in the BT.656 recommendation; pixel and row
// indices of the sensor are 0-based.
package swir_pkg;

  // ---------------- BT.656 525-line geometry (27 MHz byte clock) -------------
  localparam int unsigned LINE_WORDS   = 1716;  // bytes per line
  localparam int unsigned HBLANK_WORDS = 276;   // EAV(4) + fill(268) + SAV(4)
  localparam int unsigned FRAME_LINES  = 525;

  // Active lines: 22..261 (field 1) and 285..524 (field 2), 240 each.
  localparam int unsigned F1_FIRST_ACTIVE = 22;
  localparam int unsigned F1_LAST_ACTIVE  = 261;
  localparam int unsigned F2_FIRST_ACTIVE = 285;
  localparam int unsigned F2_LAST_ACTIVE  = 524;
  // Field 1 (F = 0) spans lines 4..265; every other line belongs to field 2.
  localparam int unsigned F1_FIRST_LINE = 4;
  localparam int unsigned F1_LAST_LINE  = 265;

  localparam logic [7:0] CHROMA_FIXED = 8'h80;  // grey: Cb = Cr = 80h
  localparam logic [7:0] Y_BLACK      = 8'h10;
  localparam logic [7:0] FILL_C       = 8'h80;  // ancillary/blanking fill
  localparam logic [7:0] FILL_Y       = 8'h10;

  // Status word XY of an EAV/SAV code: 1 F V H P3 P2 P1 P0.
  function automatic logic [7:0] xy_word(input logic f, input logic v, input logic h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  // Field bit F and blanking bit V of a 1-based line number.
  function automatic logic field_of(input int unsigned line);
    return !(line >= F1_FIRST_LINE && line <= F1_LAST_LINE);
  endfunction

  function automatic logic vblank_of(input int unsigned line);
    return !((line >= F1_FIRST_ACTIVE && line <= F1_LAST_ACTIVE) ||
             (line >= F2_FIRST_ACTIVE && line <= F2_LAST_ACTIVE));
  endfunction

  // ---------------- SDRAM -----------------------------------------------------
  // Command encoding {CS#, RAS#, CAS#, WE#}.
  typedef enum logic [3:0] {
    CMD_NOP       = 4'b0111,
    CMD_ACTIVE    = 4'b0011,
    CMD_READ      = 4'b0101,
    CMD_WRITE     = 4'b0100,
    CMD_BST       = 4'b0110,
    CMD_PRECHARGE = 4'b0010,
    CMD_REFRESH   = 4'b0001,
    CMD_LMR       = 4'b0000
  } sdram_cmd_e;

endpackage
