// tuner_top: FPGA of a guitar tuner.
//
// A microcontroller samples the microphone, takes a 256-point FFT and writes
// the bin of the strongest frequency to its parallel port B.  This logic
// reads that bin (portb_sync), reads the string the user picked on a 4x4
// keypad (poll_kb, which also turns the key into the string's bin), subtracts
// the two (compare) and lights one of eight LEDs: out of range, three flat,
// in tune, three sharp.  The picked note is shown as a letter on a
// multiplexed seven-segment display (seven_seg_display), fed the same key on
// both digits.
//
// Interface: kb_row/kb_col to the keypad matrix, portb from the
// microcontroller, led (bit 7 leftmost: out of range), seg and digit_en to
// the display.  All outputs are registered or decoded from registers; the
// LED row follows a new port-B value within 4 cycles.
//
// The block structure and tables follow the design; clocking, reset, the
// port-B synchronizer and the keypad scan are this design's choices (see
// each module).
module tuner_top
  import tuner_pkg::*;
#(
  parameter int unsigned SCAN_DIV     = 4096,  // keypad scan step, cycles
  parameter int unsigned REFRESH_BITS = 12     // display sweep, log2 cycles
) (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic [3:0] kb_row,    // keypad rows (asynchronous)
  output logic [3:0] kb_col,    // keypad columns, one-hot high
  input  bin_t       portb,     // strongest-frequency bin from port B
  output led_t       led,       // one-hot LED row
  output seg_t       seg,       // segments {g,f,e,d,c,b,a}, active low
  output logic [1:0] digit_en   // digit enables, active high
);

  key_t key;
  logic key_valid;
  bin_t ref_bin, meas_bin;
  logic ref_valid;
  led_t led_d;

  poll_kb #(.SCAN_DIV(SCAN_DIV)) u_kb (
    .clk, .rst, .kb_row, .kb_col,
    .key, .key_valid, .press(), .ref_bin, .ref_valid
  );

  portb_sync u_portb (
    .clk, .rst, .portb, .meas_bin, .update()
  );

  compare u_cmp (
    .ref_bin, .ref_valid, .meas_bin, .led(led_d)
  );

  always_ff @(posedge clk) begin
    if (rst) led <= LED_OUT_OF_RANGE;
    else     led <= led_d;
  end

  seven_seg_display #(.REFRESH_BITS(REFRESH_BITS)) u_disp (
    .clk, .rst,
    .key0(key), .key0_valid(key_valid),
    .key1(key), .key1_valid(key_valid),
    .seg, .digit_en
  );

endmodule
