// tb_portb_sync: applies random port-B words held for a few cycles and
// checks that each appears on meas_bin 4 cycles later with one update
// pulse; a word present for one cycle only (skewed lines) must be ignored.
module tb_portb_sync;
  import tuner_pkg::*;

  logic clk = 0, rst = 1;
  bin_t portb, meas_bin;
  logic update;
  int   checks = 0, failures = 0;
  bin_t prev;

  always #5 clk = ~clk;

  portb_sync dut (.clk, .rst, .portb, .meas_bin, .update);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    portb = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    prev = '0;
    for (int i = 0; i < 200; i++) begin
      bin_t v;
      int   ups;
      v = 8'($urandom);
      if (i % 5 == 0) begin
        // one-cycle glitch to a different word, then back to the old one
        portb = prev ^ 8'h5A;
        @(negedge clk) portb = prev;
        ups = 0;
        repeat (5) begin @(negedge clk); ups += update; end
        checks++;
        if (meas_bin !== prev || ups != 0) begin
          failures++;
          $display("FAIL glitch taken: meas=%h prev=%h", meas_bin, prev);
        end
      end
      portb = v;
      ups = 0;
      repeat (4) begin @(negedge clk); ups += update; end
      checks++;
      if (meas_bin !== v) begin
        failures++;
        $display("FAIL meas=%h exp=%h after 4 cycles", meas_bin, v);
      end
      repeat (2) begin @(negedge clk); ups += update; end
      checks++;
      if (ups != (v != prev)) begin
        failures++;
        $display("FAIL %0d update pulses for %h -> %h", ups, prev, v);
      end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
