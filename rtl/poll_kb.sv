// poll_kb: keypad encoder of the tuner.  Scans a 4x4 matrix keypad, turns a
// press into a 4-bit key value, remembers the last key pressed and encodes it
// into the FFT bin of the selected note.
//
// How it works: one column line at a time is driven high (kb_col, one-hot);
// the four row lines, pulled low on the board, are brought into the clock
// domain by two flip-flops.  Every SCAN_DIV clock cycles the scanner looks at
// the rows: if exactly one row is high while no key is held, the 8-bit press
// {row lines, column lines} is encoded to the key value of the keypad layout,
// latched, and the scan stops on that column until all rows are low again.
// With no key down the scan moves to the next column.  Waiting SCAN_DIV
// cycles between looks lets the lines settle and rides over contact bounce;
// a bounce can only re-latch the same key.  The latched key is held after
// release, so the selected string stays selected until another key is
// pressed.  The key feeds freq_decoder, which gives the note's bin.
//
// Interface: kb_row is asynchronous; key, key_valid, ref_bin and ref_valid
// are registered-stable; press pulses one cycle when a key is latched.
// Timing: a press is seen within 4*SCAN_DIV+3 cycles.
//
// Follows the design: 8-bit press to 4-bit key, and a second 8-bit encoding
// of a valid key to the note bin.  Own choices: column drive and row
// polarity, the scan period, the layout in tuner_pkg::KEYMAP, latching the
// key after release, and ignoring presses that raise several rows.
module poll_kb
  import tuner_pkg::*;
#(
  parameter int unsigned SCAN_DIV = 4096  // clock cycles per scan step
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic [3:0] kb_row,     // row lines from the keypad (asynchronous)
  output logic [3:0] kb_col,     // column lines to the keypad, one-hot high
  output key_t       key,        // last key pressed
  output logic       key_valid,  // a key has been pressed since reset
  output logic       press,      // one-cycle pulse: a key was just latched
  output bin_t       ref_bin,    // bin of the selected note
  output logic       ref_valid   // the key selects one of the six strings
);

  localparam int unsigned CW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;

  logic [3:0]    row_m, row_s;   // synchronizer stages
  logic [CW-1:0] div_q;
  logic          tick;
  logic [1:0]    col_q;
  logic          held_q;
  logic [7:0]    code;           // {row lines, column lines}

  // 8-bit press code to key value: one row and one column must be set.
  function automatic logic one_hot4(input logic [3:0] v);
    return (v != '0) && ((v & (v - 4'd1)) == '0);
  endfunction

  function automatic logic [4:0] encode_press(input logic [7:0] c);
    logic [1:0] r, k;
    r = '0;
    k = '0;
    for (int i = 0; i < 4; i++) begin
      if (c[4+i]) r = 2'(i);
      if (c[i])   k = 2'(i);
    end
    if (one_hot4(c[7:4]) && one_hot4(c[3:0]))
      return {1'b1, KEYMAP[{r, k}]};
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    row_m <= kb_row;
    row_s <= row_m;
  end

  assign tick   = (div_q == CW'(SCAN_DIV - 1));
  assign kb_col = 4'b0001 << col_q;
  assign code   = {row_s, kb_col};

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q     <= '0;
      col_q     <= '0;
      held_q    <= 1'b0;
      key       <= '0;
      key_valid <= 1'b0;
      press     <= 1'b0;
    end else begin
      press <= 1'b0;
      div_q <= tick ? '0 : div_q + 1'b1;
      if (tick) begin
        if (held_q) begin
          if (row_s == '0) begin
            held_q <= 1'b0;
            col_q  <= col_q + 1'b1;
          end
        end else if (encode_press(code)[4]) begin
          key       <= encode_press(code)[3:0];
          key_valid <= 1'b1;
          held_q    <= 1'b1;
          press     <= 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end
    end
  end

  freq_decoder u_freq (
    .key      (key),
    .key_valid(key_valid),
    .ref_bin  (ref_bin),
    .ref_valid(ref_valid)
  );

  // exactly one column is driven at any time
  always_comb assert ($onehot(kb_col)) else $error("poll_kb: column drive not one-hot");

  initial assert (SCAN_DIV >= 4)
    else $error("poll_kb: SCAN_DIV must cover the row synchronizer delay");

endmodule
