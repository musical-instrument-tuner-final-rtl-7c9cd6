// tb_compare: exhaustive check of the tuner's compare/LED decode.
//
// Every reference bin, every measured bin and both ref_valid levels are
// applied.  The expected LED row is worked out from the signed difference
// d = ref - meas taken modulo 256: |d| <= 3 lights LED 3+d (so +3 is bit 6,
// -3 is bit 0), anything else lights bit 7, and no selected string lights
// bit 7 too.
module tb_compare;
  import tuner_pkg::*;

  bin_t ref_bin, meas_bin;
  logic ref_valid;
  led_t led;
  int   checks = 0, failures = 0;
  int   hits [8];

  compare dut (.ref_bin, .ref_valid, .meas_bin, .led);

  function automatic led_t expected(int r, int m, bit v);
    int d;
    d = (r - m + 256) % 256;
    if (d >= 128) d -= 256;
    if (!v) return 8'h80;
    if (d >= -3 && d <= 3) return 8'(1 << (3 + d));
    return 8'h80;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int r = 0; r < 256; r++)
        for (int m = 0; m < 256; m++) begin
          ref_bin = 8'(r); meas_bin = 8'(m); ref_valid = v[0];
          #1;
          checks++;
          if (led !== expected(r, m, v[0])) begin
            failures++;
            if (failures < 10)
              $display("FAIL ref=%h meas=%h valid=%0d led=%h exp=%h", r, m, v, led, expected(r, m, v[0]));
          end
          for (int b = 0; b < 8; b++) if (led[b]) hits[b]++;
        end
    // every LED must have been lit at least once
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (hits[b] == 0) begin failures++; $display("FAIL LED %0d never lit", b); end
    end
    // spot checks straight from the table of difference codes
    ref_valid = 1;
    ref_bin = 8'h20; meas_bin = 8'h1F; #1; checks++; if (led !== 8'h10) failures++;
    ref_bin = 8'h20; meas_bin = 8'h23; #1; checks++; if (led !== 8'h01) failures++;
    ref_bin = 8'h20; meas_bin = 8'h20; #1; checks++; if (led !== 8'h08) failures++;
    ref_bin = 8'h20; meas_bin = 8'h30; #1; checks++; if (led !== 8'h80) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
