// tuner_pkg: types and constants shared by the guitar-tuner FPGA logic.
//
// The tuner compares the FFT bin of the strongest frequency, sent by a
// microcontroller over an 8-bit parallel port, with the bin of the note the
// user picked on a 4x4 keypad, and lights one of eight LEDs.  This package
// holds the key codes, the note-to-bin table, the LED codes and the
// seven-segment patterns so that every module and testbench uses one copy.
//
// Follows the design: the six note bins (E 18h, A 20h, D 2Bh, G 39h, B 48h,
// high e 5Fh), the keys that select them (E, A, D, 0, B, F) and the one-hot
// LED codes (bit 7 out of range, bits 6..4 flat, bit 3 in tune, bits 2..0
// sharp).  Own choices: the keypad layout, active-low segment levels and the
// segment bit order {g,f,e,d,c,b,a}.
package tuner_pkg;

  typedef logic [3:0] key_t;   // hexadecimal key value 0..F
  typedef logic [7:0] bin_t;   // FFT bin number (position relative to DC)
  typedef logic [7:0] led_t;   // one-hot LED row, bit 7 leftmost
  typedef logic [6:0] seg_t;   // segments {g,f,e,d,c,b,a}, active low

  // Keys that select the six guitar strings.
  localparam key_t KEY_E_LOW  = 4'hE;
  localparam key_t KEY_A      = 4'hA;
  localparam key_t KEY_D      = 4'hD;
  localparam key_t KEY_G      = 4'h0;
  localparam key_t KEY_B      = 4'hB;
  localparam key_t KEY_E_HIGH = 4'hF;

  // FFT bin of each string with 256 samples at about 1.8 kHz (about 7 Hz
  // per bin), as measured on the real system.
  localparam bin_t BIN_E_LOW  = 8'h18;  // 164.81 Hz
  localparam bin_t BIN_A      = 8'h20;  // 220.00 Hz
  localparam bin_t BIN_D      = 8'h2B;  // 293.66 Hz
  localparam bin_t BIN_G      = 8'h39;  // 392.00 Hz
  localparam bin_t BIN_B      = 8'h48;  // 493.88 Hz
  localparam bin_t BIN_E_HIGH = 8'h5F;  // 659.26 Hz

  // LED codes: one LED lit, bit 7 is the leftmost (out of range).
  localparam led_t LED_OUT_OF_RANGE = 8'h80;
  localparam led_t LED_FLAT3        = 8'h40;  // reference - measured = +3
  localparam led_t LED_FLAT2        = 8'h20;  // +2
  localparam led_t LED_FLAT1        = 8'h10;  // +1
  localparam led_t LED_IN_TUNE      = 8'h08;  //  0
  localparam led_t LED_SHARP1       = 8'h04;  // -1
  localparam led_t LED_SHARP2       = 8'h02;  // -2
  localparam led_t LED_SHARP3       = 8'h01;  // -3

  // Seven-segment patterns, active low, bit order {g,f,e,d,c,b,a}.
  localparam seg_t SEG_A     = ~7'b1110111;  // a b c e f g
  localparam seg_t SEG_B_LC  = ~7'b1111100;  // b: c d e f g
  localparam seg_t SEG_D_LC  = ~7'b1011110;  // d: b c d e g
  localparam seg_t SEG_E     = ~7'b1111001;  // E: a d e f g
  localparam seg_t SEG_E_LC  = ~7'b1111011;  // e: a b d e f g
  localparam seg_t SEG_G     = ~7'b0111101;  // G: a c d e f
  localparam seg_t SEG_DASH  = ~7'b1000000;  // -: g

  // Keypad layout: key value at row r (0 = top), column c (0 = left).
  // Index as KEYMAP[r*4 + c].
  localparam key_t KEYMAP [16] = '{
    4'h1, 4'h2, 4'h3, 4'hA,
    4'h4, 4'h5, 4'h6, 4'hB,
    4'h7, 4'h8, 4'h9, 4'hC,
    4'hE, 4'h0, 4'hF, 4'hD
  };

endpackage
