// tb_tuner_notes: the tuner at its default sizes tuning the six guitar
// strings end to end.
//
// For each string the key is pressed on a keypad model, then tones are
// played into a model of the microcontroller program (sampling, 8-bit FFT,
// peak search) whose bin goes to port B.  Tones: the exact note, and the
// note 2%, 4% and 10% low and high.  Checks: the displayed letter; the LED
// row against the value worked out here from the bin the program found;
// the exact note lighting the in-tune LED or a neighbour (the 8-bit FFT may
// move a peak by one bin); a low tone never lighting a sharp LED and a
// high tone never a flat one.  The last two apply only when the program's
// peak lies within 2 bins of f*256/fs: its 8-bit FFT, with the DC and bin-64
// entries cleared on every pass, at times reports a spurious peak (often bin
// 96) or none (then it repeats its previous bin).  Both cases are counted
// and printed.  Each LED class (in tune, flat, sharp, out of
// range) must occur.
//
// The model's sampling rate, 1767.7 Hz, lies in the narrow range
// (1767.2 Hz to 1768.3 Hz) for which each note's nearest bin, f*256/fs, is
// the bin of the note table; it agrees with the loop's "about 1.8 kHz".
module tb_tuner_notes;
  import tuner_pkg::*;

  logic        clk = 0, rst = 1;
  logic [15:0] pressed = '0;
  logic [3:0]  kb_row, kb_col;
  bin_t        portb;
  led_t        led;
  seg_t        seg;
  logic [1:0]  digit_en;
  int          checks = 0, failures = 0;
  int          n_stale = 0, n_spur = 0, n_tune = 0, n_flat = 0, n_sharp = 0, n_oor = 0, n_exact_in_tune = 0;

  // string: key index on the keypad (row*4+col), key, frequency, table bin
  localparam int    KIDX [6] = '{12, 3, 15, 13, 7, 14};
  localparam real   FREQ [6] = '{164.81, 220.0, 293.66, 392.0, 493.88, 659.26};
  localparam int    NBIN [6] = '{'h18, 'h20, 'h2B, 'h39, 'h48, 'h5F};
  localparam string NAME [6] = '{"E", "A", "D", "G", "B", "e"};
  localparam real   DETUNE [7] = '{0.0, -0.02, 0.02, -0.04, 0.04, -0.10, 0.10};

  always #5 clk = ~clk;

  keypad_model kp (.pressed, .kb_col, .kb_row);
  hc11_model   hc (.portb);
  tuner_top    dut (.clk, .rst, .kb_row, .kb_col, .portb, .led, .seg, .digit_en);

  function automatic seg_t lit(string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return ~v;
  endfunction

  function automatic seg_t letter(int n);
    case (n)
      0: return lit("adefg");   // E
      1: return lit("abcefg");  // A
      2: return lit("bcdeg");   // d
      3: return lit("acdef");   // G
      4: return lit("cdefg");   // b
      default: return lit("abdefg");  // e
    endcase
  endfunction

  function automatic int offset(int ref_b, int meas);  // 99: out of range
    int d = ref_b - meas;
    return (d >= -3 && d <= 3) ? d : 99;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 6; s++) begin
      pressed = 16'(1) << KIDX[s];
      repeat (4 * 4096 + 20) @(posedge clk);
      pressed = '0;
      repeat (4096) @(posedge clk);
      check(seg === letter(s), $sformatf("letter for string %s", NAME[s]));
      repeat (2100) @(posedge clk);
      check(seg === letter(s), $sformatf("letter for string %s, other digit", NAME[s]));
      for (int t = 0; t < 7; t++) begin
        logic [7:0] b;
        bit         found, near;
        real        bin_err;
        int         o;
        led_t       e;
        hc.measure(FREQ[s] * (1.0 + DETUNE[t]), b, found);
        if (!found) n_stale++;
        bin_err = real'(b) - FREQ[s] * (1.0 + DETUNE[t]) * 256.0 / 1767.7;
        near = found && bin_err <= 2.0 && bin_err >= -2.0;
        if (!near) n_spur++;
        repeat (8) @(posedge clk);
        @(negedge clk);
        o = offset(NBIN[s], int'(b));
        e = (o == 99) ? 8'h80 : 8'(1 << (3 + o));
        check(led === e, $sformatf("%s %0.2f Hz: bin %0d led %h exp %h",
                                   NAME[s], FREQ[s] * (1.0 + DETUNE[t]), b, led, e));
        $display("string %s  tone %7.2f Hz  bin %3d%s (note %3d)  led %b",
                 NAME[s], FREQ[s] * (1.0 + DETUNE[t]), b, found ? "" : "*", NBIN[s], led);
        if (t == 0) begin
          check(found && o >= -1 && o <= 1, $sformatf("exact %s within one bin", NAME[s]));
          if (o == 0) n_exact_in_tune++;
        end
        if (near && DETUNE[t] < 0.0) check(!(o < 0), $sformatf("low %s not sharp", NAME[s]));
        if (near && DETUNE[t] > 0.0) check(!(o > 0 && o != 99), $sformatf("high %s not flat", NAME[s]));
        if (led == 8'h08) n_tune++;
        if (led[6:4] != 0) n_flat++;
        if (led[2:0] != 0) n_sharp++;
        if (led == 8'h80) n_oor++;
      end
    end
    check(n_tune > 0, "in tune seen");
    check(n_flat > 0, "flat seen");
    check(n_sharp > 0, "sharp seen");
    check(n_oor > 0, "out of range seen");
    $display("tones for which the program kept its previous bin: %0d", n_stale);
    $display("tones whose peak lies over 2 bins from f*256/fs: %0d", n_spur);
    $display("exact notes in tune: %0d of 6; in tune %0d, flat %0d, sharp %0d, out of range %0d",
             n_exact_in_tune, n_tune, n_flat, n_sharp, n_oor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
