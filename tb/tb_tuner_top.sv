// tb_tuner_top: end-to-end test of the tuner FPGA at a short keypad scan and
// display refresh.
//
// A keypad model selects each of the 16 keys in turn; for each, port B is
// driven with bins around the key's note bin and the LED row and the letter
// on the display are checked against values worked out here.  Mechanisms
// counted, each of which must happen at least once: a key latched, every one
// of the 8 LEDs lit, a dash for a key that selects no string, out of range
// forced while no string is selected, the two display digits taking turns,
// and a skewed one-cycle port-B word being ignored.
module tb_tuner_top;
  import tuner_pkg::*;

  localparam int SCAN_DIV = 8;
  localparam int RB       = 3;

  logic        clk = 0, rst = 1;
  logic [15:0] pressed = '0;
  logic [3:0]  kb_row, kb_col;
  bin_t        portb = '0;
  led_t        led;
  seg_t        seg;
  logic [1:0]  digit_en;
  int          checks = 0, failures = 0;
  int          n_latch = 0, n_dash = 0, n_forced = 0, n_digit_switch = 0, n_glitch = 0;
  int          led_hits [8];
  logic [1:0]  last_en = '0;

  localparam logic [3:0] LAYOUT [16] = '{1,2,3,'hA, 4,5,6,'hB, 7,8,9,'hC, 'hE,0,'hF,'hD};

  always #5 clk = ~clk;

  keypad_model kp (.pressed, .kb_col, .kb_row);
  tuner_top #(.SCAN_DIV(SCAN_DIV), .REFRESH_BITS(RB)) dut (
    .clk, .rst, .kb_row, .kb_col, .portb, .led, .seg, .digit_en
  );

  always @(posedge clk) begin
    if (!rst && digit_en != last_en) n_digit_switch++;
    last_en <= digit_en;
  end

  function automatic int note_bin(logic [3:0] k);   // -1: no string
    case (k)
      'hE: return 'h18;
      'hA: return 'h20;
      'hD: return 'h2B;
      'h0: return 'h39;
      'hB: return 'h48;
      'hF: return 'h5F;
      default: return -1;
    endcase
  endfunction

  function automatic seg_t lit(string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return ~v;
  endfunction

  function automatic seg_t letter(logic [3:0] k);
    case (k)
      'hA: return lit("abcefg");
      'h0: return lit("acdef");
      'hB: return lit("cdefg");
      'hD: return lit("bcdeg");
      'hE: return lit("adefg");
      'hF: return lit("abdefg");
      default: return lit("g");
    endcase
  endfunction

  function automatic led_t exp_led(int ref_b, int meas);
    int d;
    if (ref_b < 0) return 8'h80;
    d = ((ref_b - meas) % 256 + 256) % 256;
    if (d >= 128) d -= 256;
    if (d >= -3 && d <= 3) return 8'(1 << (3 + d));
    return 8'h80;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic apply_bin(int b, int ref_b, logic [3:0] k);
    portb = 8'(b);
    repeat (6) @(posedge clk);
    @(negedge clk);
    check(led === exp_led(ref_b, b),
          $sformatf("key %h bin %h: led %h exp %h", k, b, led, exp_led(ref_b, b)));
    for (int i = 0; i < 8; i++) if (led[i]) led_hits[i]++;
    if (ref_b < 0 && exp_led(-1, b) != exp_led(0, b)) n_forced++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // before any key: dash, out of range
    apply_bin('h20, -1, 4'hX);
    repeat (2**RB) begin
      @(negedge clk);
      check(seg === lit("g"), "dash before a key is pressed");
    end
    n_dash++;
    for (int i = 0; i < 16; i++) begin
      logic [3:0] k;
      int         nb;
      k  = LAYOUT[i];
      nb = note_bin(k);
      pressed = 16'(1) << i;
      repeat (4*SCAN_DIV + 6) @(posedge clk);
      pressed = '0;
      repeat (SCAN_DIV) @(posedge clk);
      n_latch++;
      // letter on whichever digit is lit, over one full sweep
      repeat (2**RB) begin
        @(negedge clk);
        check(seg === letter(k), $sformatf("letter for key %h: %b", k, seg));
      end
      if (nb < 0) n_dash++;
      for (int d = -5; d <= 5; d++) apply_bin((nb < 0 ? 'h20 : nb) + d, nb, k);
      apply_bin($urandom_range(0, 255), nb, k);
      if (nb < 0) apply_bin(0, nb, k);  // would read in tune without the valid flag
      // one-cycle skewed word on port B must not reach the LEDs
      if (nb >= 0) begin
        led_t led_prev;
        apply_bin(nb, nb, k);
        led_prev = led;
        @(negedge clk) portb = 8'(nb + 1);
        @(negedge clk) portb = 8'(nb);
        repeat (6) begin
          @(negedge clk);
          check(led === led_prev, "skewed port-B word ignored");
        end
        n_glitch++;
      end
    end
    check(n_latch > 0, "keys latched");
    check(n_dash > 0, "dash shown");
    check(n_forced > 0, "out of range forced without a string");
    check(n_digit_switch > 0, "display digits multiplexed");
    check(n_glitch > 0, "skewed word ignored");
    for (int i = 0; i < 8; i++) check(led_hits[i] > 0, $sformatf("LED %0d lit", i));
    $display("mechanisms: latched=%0d dash=%0d forced=%0d digit_switches=%0d glitches=%0d",
             n_latch, n_dash, n_forced, n_digit_switch, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
