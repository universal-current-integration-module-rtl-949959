// Shared constants of the current integration module (CIM).
//
// The CIM digitises the voltage across a battery sense resistor with a
// small flash converter (eight references out of a 250-step divider) and
// integrates the 3-bit result every clock into a 32-bit total. That total
// is split into the low 3 bits held beside a 3-bit adder, a 13-bit counter
// (bits 3..15) and a 16-bit counter (bits 16..31). The host reads and
// presets it one byte at a time. The sizes below are the ones of the
// original chip; the byte-select encoding type is this design's choice.
package cim_pkg;

  localparam int unsigned N_REF   = 8;    // comparator references VOT0..VOT7
  localparam int unsigned LEVELS  = 250;  // steps of the reference divider
  localparam int unsigned CODE_W  = 3;    // ADC code width
  localparam int unsigned LOW_W   = 3;    // bits held by the adder stage
  localparam int unsigned MID_W   = 13;   // first counter
  localparam int unsigned HIGH_W  = 16;   // second counter
  localparam int unsigned ACC_W   = LOW_W + MID_W + HIGH_W;  // 32
  localparam int unsigned MID_LSB  = LOW_W;           // bit 3
  localparam int unsigned HIGH_LSB = LOW_W + MID_W;   // bit 16

  // Byte select carried by the {..HD..EN, ..LD..EN} pin pairs.
  typedef enum logic [1:0] {
    BYTE0 = 2'b00,  // bits 7..0
    BYTE1 = 2'b01,  // bits 15..8
    BYTE2 = 2'b10,  // bits 23..16
    BYTE3 = 2'b11   // bits 31..24
  } byte_sel_e;

endpackage
