// tb_seven_seg_decoder: checks the letter shown for all 16 keys.  The
// expected pattern of each letter is written here as the list of lit
// segments (a..g) and turned into the active-low {g,f,e,d,c,b,a} vector.
module tb_seven_seg_decoder;
  import tuner_pkg::*;

  key_t key;
  logic key_valid;
  seg_t seg;
  int   checks = 0, failures = 0;

  seven_seg_decoder dut (.key, .key_valid, .seg);

  function automatic seg_t lit(string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return ~v;
  endfunction

  function automatic seg_t expected(int k);
    case (k)
      'hA: return lit("abcefg");   // A
      'h0: return lit("acdef");    // G
      'hB: return lit("cdefg");    // b
      'hD: return lit("bcdeg");    // d
      'hE: return lit("adefg");    // E
      'hF: return lit("abdefg");   // e
      default: return lit("g");    // dash
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int k = 0; k < 16; k++) begin
        key = 4'(k); key_valid = v[0];
        #1;
        checks++;
        if (seg !== (v ? expected(k) : lit("g"))) begin
          failures++;
          $display("FAIL key=%h valid=%0d seg=%b", k, v, seg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
