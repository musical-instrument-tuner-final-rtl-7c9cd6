// freq_decoder: turns the selected key into the FFT bin of its note.
//
// Combinational table.  The six keys that name guitar strings (E = low E,
// A, D, 0 = G, B, F = high e) give the bin at which the microcontroller's
// 256-point FFT, sampling at about 1.8 kHz, finds that note; ref_valid is
// then 1.  Every other key, or no key at all (key_valid = 0), gives
// ref_valid = 0 and bin 0.  The bins are the measured values of the design;
// the key assignment follows the display table.  Flagging the remaining keys
// as invalid, rather than giving them some bin, is this design's choice.
module freq_decoder
  import tuner_pkg::*;
(
  input  key_t key,        // latched key value
  input  logic key_valid,  // a key has been pressed since reset
  output bin_t ref_bin,    // bin of the selected note
  output logic ref_valid   // key names one of the six strings
);

  always_comb begin
    ref_bin   = '0;
    ref_valid = key_valid;
    unique case (key)
      KEY_E_LOW:  ref_bin = BIN_E_LOW;
      KEY_A:      ref_bin = BIN_A;
      KEY_D:      ref_bin = BIN_D;
      KEY_G:      ref_bin = BIN_G;
      KEY_B:      ref_bin = BIN_B;
      KEY_E_HIGH: ref_bin = BIN_E_HIGH;
      default:    ref_valid = 1'b0;
    endcase
    if (!key_valid) ref_bin = '0;
  end

endmodule
