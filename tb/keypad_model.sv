// keypad_model: 4x4 matrix keypad seen from the FPGA pins.
//
// pressed[r*4+c] closes the switch between row r and column c.  A row line
// is high when a closed switch connects it to a column that is driven high;
// otherwise the board's pull-down holds it low.  Purely combinational.
module keypad_model (
  input  logic [15:0] pressed,  // one bit per key, row-major
  input  logic [3:0]  kb_col,   // column lines driven by the FPGA
  output logic [3:0]  kb_row    // row lines read by the FPGA
);
  always_comb
    for (int r = 0; r < 4; r++) begin
      kb_row[r] = 1'b0;
      for (int c = 0; c < 4; c++)
        if (pressed[r*4+c] && kb_col[c]) kb_row[r] = 1'b1;
    end
endmodule
