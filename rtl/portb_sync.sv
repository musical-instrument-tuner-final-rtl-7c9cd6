// portb_sync: receives the strongest-frequency bin written by the
// microcontroller on its 8-bit parallel port B.
//
// The port lines change asynchronously to the FPGA clock.  They pass through
// two flip-flops; a value is taken only when the synchronized lines hold the
// same value on two successive cycles, so a word whose bits arrive with skew
// is never taken half old and half new.  meas_bin keeps the last value taken,
// and update pulses for one cycle whenever it changes.  Latency: 4 cycles
// from a stable input to meas_bin.
//
// Follows the design: an 8-bit bin written to port B and read by the FPGA.
// Own choices: the synchronizer, the two-sample agreement rule, the reset
// value 0 and the update pulse.
module portb_sync
  import tuner_pkg::*;
(
  input  logic clk,
  input  logic rst,       // synchronous, active high
  input  bin_t portb,     // port B lines (asynchronous)
  output bin_t meas_bin,  // last stable value
  output logic update     // one-cycle pulse: meas_bin changed
);

  bin_t s1_q, s2_q, s3_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_q     <= '0;
      s2_q     <= '0;
      s3_q     <= '0;
      meas_bin <= '0;
      update   <= 1'b0;
    end else begin
      s1_q   <= portb;
      s2_q   <= s1_q;
      s3_q   <= s2_q;
      update <= 1'b0;
      if (s2_q == s3_q && s3_q != meas_bin) begin
        meas_bin <= s3_q;
        update   <= 1'b1;
      end
    end
  end

endmodule
