// seven_seg_decoder: shows the selected note as a letter on one digit.
//
// Combinational.  Key A shows "A", 0 shows "G", B shows "b", D shows "d",
// E shows "E" (low E string) and F shows "e" (high e string); every other key
// shows a dash, the sign of a key that selects no string.  The letters follow
// the design.  Showing a dash before any key has been pressed, active-low
// segments and the {g,f,e,d,c,b,a} bit order are this design's choices.
module seven_seg_decoder
  import tuner_pkg::*;
(
  input  key_t key,        // key value
  input  logic key_valid,  // a key has been pressed
  output seg_t seg         // segments {g,f,e,d,c,b,a}, active low
);

  always_comb begin
    unique case (key)
      KEY_A:      seg = SEG_A;
      KEY_G:      seg = SEG_G;
      KEY_B:      seg = SEG_B_LC;
      KEY_D:      seg = SEG_D_LC;
      KEY_E_LOW:  seg = SEG_E;
      KEY_E_HIGH: seg = SEG_E_LC;
      default:    seg = SEG_DASH;
    endcase
    if (!key_valid) seg = SEG_DASH;
  end

endmodule
