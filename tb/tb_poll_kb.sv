// tb_poll_kb: presses every key of the 4x4 keypad on a keypad model and
// checks the key latched by poll_kb, its note bin, that the key is kept after
// release, and that each press is seen within 4*SCAN_DIV+3 cycles.  Also
// checks that a press raising two rows is ignored and that a bouncing press
// still latches the right key.  The layout and note bins are written here
// independently of the design's package.
module tb_poll_kb;
  import tuner_pkg::*;

  localparam int SCAN_DIV = 8;

  logic        clk = 0, rst = 1;
  logic [15:0] pressed = '0;
  logic [3:0]  kb_row, kb_col;
  key_t        key;
  logic        key_valid, press, ref_valid;
  bin_t        ref_bin;
  int          checks = 0, failures = 0;

  // key value at row r, column c
  localparam logic [3:0] LAYOUT [16] = '{1,2,3,'hA, 4,5,6,'hB, 7,8,9,'hC, 'hE,0,'hF,'hD};

  always #5 clk = ~clk;

  keypad_model kp (.pressed, .kb_col, .kb_row);
  poll_kb #(.SCAN_DIV(SCAN_DIV)) dut (
    .clk, .rst, .kb_row, .kb_col, .key, .key_valid, .press, .ref_bin, .ref_valid
  );

  function automatic logic [8:0] note_bin(logic [3:0] k);
    case (k)
      'hE: return {1'b1, 8'h18};
      'hA: return {1'b1, 8'h20};
      'hD: return {1'b1, 8'h2B};
      'h0: return {1'b1, 8'h39};
      'hB: return {1'b1, 8'h48};
      'hF: return {1'b1, 8'h5F};
      default: return 9'h000;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // press one key, wait for the press pulse, release it
  task automatic press_key(int idx);
    int n = 0;
    pressed = 16'(1) << idx;
    while (!press && n < 4*SCAN_DIV + 10) begin @(posedge clk); n++; end
    check(press === 1'b1, $sformatf("press of key %0d seen", idx));
    check(n <= 4*SCAN_DIV + 3, $sformatf("press latency %0d cycles", n));
    @(negedge clk);
    check(key === LAYOUT[idx], $sformatf("key %0d value %h exp %h", idx, key, LAYOUT[idx]));
    check(key_valid === 1'b1, "key_valid");
    check({ref_valid, ref_bin} === note_bin(LAYOUT[idx]),
          $sformatf("key %h bin %b/%h", key, ref_valid, ref_bin));
    pressed = '0;
    repeat (3*SCAN_DIV) @(posedge clk);
    @(negedge clk);
    check(key === LAYOUT[idx], "key kept after release");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2*SCAN_DIV) @(posedge clk);
    check(key_valid === 1'b0 && ref_valid === 1'b0, "nothing selected after reset");
    for (int i = 0; i < 16; i++) press_key(i);
    // keys in one column, two rows: must be ignored
    pressed = 16'h0011;
    repeat (8*SCAN_DIV) begin
      @(posedge clk);
      check(press === 1'b0, "two-row press ignored");
    end
    pressed = '0;
    repeat (2*SCAN_DIV) @(posedge clk);
    // bouncing press of key A (row 0, column 3)
    for (int b = 0; b < 6; b++) begin
      pressed = (b % 2) ? 16'h0000 : 16'h0008;
      repeat (SCAN_DIV / 2 + 1) @(posedge clk);
    end
    pressed = 16'h0008;
    repeat (6*SCAN_DIV) @(posedge clk);
    check(key === 4'hA && ref_bin === 8'h20, "bouncing press latches A");
    pressed = '0;
    // a reset clears the selection
    repeat (2*SCAN_DIV) @(posedge clk);
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(key_valid === 1'b0, "reset clears key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
