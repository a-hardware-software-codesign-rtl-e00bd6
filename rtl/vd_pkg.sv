// Shared constants and types of the vehicle-detector FPGA.
//
// The frame geometry (320 x 240 pixels, one byte each) and the field rate
// (60 fields per second) are the system's own figures. The CPU address map,
// the register offsets and the background-update defaults are choices of
// this design: the CPU sees a 20-bit byte address whose top three bits pick
// a region (image bank 0, image bank 1, background, OSD, registers) and whose
// low 17 bits are the byte offset, large enough for one 128 K x 8 SRAM.
package vd_pkg;

  localparam int unsigned DEF_IMG_W    = 320;
  localparam int unsigned DEF_IMG_H    = 240;
  localparam int unsigned FRAME_PIXELS = DEF_IMG_W * DEF_IMG_H;   // 76800
  localparam int unsigned PIX_W        = 8;
  localparam int unsigned OFS_W        = 17;              // 128 K byte window
  localparam int unsigned CPU_AW       = 20;

  // 20 minutes at 60 fields per second.
  localparam int unsigned DEF_BG_PERIOD = 20 * 60 * 60;

  // Background-update defaults (programmable through registers).
  localparam logic [7:0] DEF_STILL_TH = 8'd12;
  localparam logic [2:0] DEF_BG_SHIFT = 3'd2;

  typedef logic [PIX_W-1:0] pixel_t;

  typedef enum logic [2:0] {
    RGN_BANK0 = 3'd0,
    RGN_BANK1 = 3'd1,
    RGN_BG    = 3'd2,
    RGN_OSD   = 3'd3,
    RGN_REGS  = 3'd4
  } region_e;

  // Register offsets inside RGN_REGS.
  typedef enum logic [4:0] {
    REG_STATUS     = 5'h00,  // [0] bank being written, [1] a complete field is stored,
                             // [2] capture overflowed in the last field, [3] background valid,
                             // [4] the last field was complete, [6:5] background mode of the
                             // field being captured
    REG_CTRL       = 5'h01,  // [0] OSD enable; writing [1] forces a background update
                             // field, writing [2] reloads the background from the next field
    REG_STILL_TH   = 5'h02,  // |current - previous| at or below this is a still pixel
    REG_BG_SHIFT   = 5'h03,  // background moves by (current - background) >>> shift
    REG_FIELDS_LO  = 5'h04,  // stored field counter, 16 bits
    REG_FIELDS_HI  = 5'h05,
    REG_PERIOD_0   = 5'h06,  // background-update period in fields, 24 bits
    REG_PERIOD_1   = 5'h07,
    REG_PERIOD_2   = 5'h08,
    REG_CONFLICTS  = 5'h09,  // refused CPU accesses to the bank being written (saturating)
    REG_UPDATES    = 5'h0A,  // background fields written (init and update, wraps)
    REG_MOVING_LO  = 5'h0B,  // moving pixels counted in the last update field, 17 bits
    REG_MOVING_MID = 5'h0C,
    REG_MOVING_HI  = 5'h0D
  } reg_e;

  // What the background updater does during the current field.
  typedef enum logic [1:0] {
    BG_IDLE   = 2'd0,
    BG_INIT   = 2'd1,   // copy the field into the background
    BG_UPDATE = 2'd2    // move the background toward still pixels
  } bg_mode_e;

endpackage
