// compare: decides how far the played note is from the selected one and
// picks the LED that shows it.
//
// The reference bin of the selected note minus the measured bin from the
// microcontroller is formed in 8 bits (two's complement, wrapping).  A
// difference of +3..+1 means the played note is low (flat) and lights bit
// 6..4, 0 lights bit 3 (in tune), -1..-3 means it is high (sharp) and lights
// bit 2..0; anything else lights bit 7 (out of range).  Bit 7 is the
// leftmost LED, so the row reads out of range, flat, in tune, sharp from
// left to right.  Combinational.  The difference codes follow the design;
// the ref_valid input, which forces out of range while no string is
// selected, is this design's own addition.
module compare
  import tuner_pkg::*;
(
  input  bin_t ref_bin,    // bin of the selected note
  input  logic ref_valid,  // a string is selected
  input  bin_t meas_bin,   // bin of the strongest frequency played
  output led_t led         // one-hot LED row
);

  bin_t diff;

  always_comb begin
    diff = ref_bin - meas_bin;
    case (diff)
      8'h01:   led = LED_FLAT1;
      8'h02:   led = LED_FLAT2;
      8'h03:   led = LED_FLAT3;
      8'h00:   led = LED_IN_TUNE;
      8'hFF:   led = LED_SHARP1;
      8'hFE:   led = LED_SHARP2;
      8'hFD:   led = LED_SHARP3;
      default: led = LED_OUT_OF_RANGE;
    endcase
    if (!ref_valid) led = LED_OUT_OF_RANGE;
  end

  // exactly one LED is lit at any time
  always_comb assert ($onehot(led)) else $error("compare: LED code %h not one-hot", led);

endmodule
