// seven_seg_display: drives a two-digit multiplexed seven-segment display
// through one set of segment lines.
//
// A free-running counter of REFRESH_BITS bits selects, by its top bit, which
// digit is lit; the key of that digit goes through one seven_seg_decoder and
// its enable line (digit_en, active high) is raised.  Each digit is lit half
// of the time, for 2**(REFRESH_BITS-1) cycles in a row.  In the tuner both
// digit inputs carry the same key and one digit is left unpowered on the
// board, so one letter is shown.
//
// Follows the design: multiplexed two-digit hardware fed twice with the same
// key.  Own choices: the refresh period, active-high digit enables and a
// synchronous reset of the counter.
module seven_seg_display
  import tuner_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 12  // 2**REFRESH_BITS cycles per sweep
) (
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  key_t       key0,        // key shown on digit 0
  input  logic       key0_valid,
  input  key_t       key1,        // key shown on digit 1
  input  logic       key1_valid,
  output seg_t       seg,         // segments {g,f,e,d,c,b,a}, active low
  output logic [1:0] digit_en     // digit enables, active high
);

  logic [REFRESH_BITS-1:0] cnt_q;
  logic                    sel;
  key_t                    key_mux;
  logic                    valid_mux;

  always_ff @(posedge clk) begin
    if (rst) cnt_q <= '0;
    else     cnt_q <= cnt_q + 1'b1;
  end

  assign sel       = cnt_q[REFRESH_BITS-1];
  assign key_mux   = sel ? key1 : key0;
  assign valid_mux = sel ? key1_valid : key0_valid;
  assign digit_en  = sel ? 2'b10 : 2'b01;

  seven_seg_decoder u_dec (
    .key      (key_mux),
    .key_valid(valid_mux),
    .seg      (seg)
  );

endmodule
