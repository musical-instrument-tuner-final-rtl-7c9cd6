// tb_seven_seg_display: with a 3-bit refresh counter each digit must be lit
// for 4 cycles in turn, the enables must be one-hot, and the segments must
// show the letter of the digit that is lit.  Two different keys on the two
// digits make the multiplexing visible.
module tb_seven_seg_display;
  import tuner_pkg::*;

  localparam int RB = 3;

  logic       clk = 0, rst = 1;
  key_t       key0, key1;
  logic       key0_valid, key1_valid;
  seg_t       seg;
  logic [1:0] digit_en;
  int         checks = 0, failures = 0;
  int         run, switches;
  logic [1:0] last_en;

  always #5 clk = ~clk;

  seven_seg_display #(.REFRESH_BITS(RB)) dut (
    .clk, .rst, .key0, .key0_valid, .key1, .key1_valid, .seg, .digit_en
  );

  function automatic seg_t lit(string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return ~v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key0 = 4'hA; key0_valid = 1;   // "A"
    key1 = 4'hE; key1_valid = 1;   // "E"
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    last_en = digit_en; run = 0; switches = 0;
    repeat (64) begin
      @(negedge clk);
      checks++;
      if (!(digit_en == 2'b01 || digit_en == 2'b10)) failures++;
      checks++;
      if (digit_en == 2'b01 && seg !== lit("abcefg")) failures++;
      if (digit_en == 2'b10 && seg !== lit("adefg"))  failures++;
      if (digit_en != last_en) begin
        switches++;
        checks++;
        if (switches > 1 && run != 2**(RB-1)) begin
          failures++;
          $display("FAIL digit lit for %0d cycles", run);
        end
        run = 1;
      end else run++;
      last_en = digit_en;
    end
    checks++;
    if (switches < 10) begin failures++; $display("FAIL only %0d switches", switches); end
    // no key: dash on both digits
    key0_valid = 0; key1_valid = 0;
    repeat (8) begin
      @(negedge clk);
      checks++;
      if (seg !== lit("g")) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
