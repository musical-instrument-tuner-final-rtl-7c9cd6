// tb_freq_decoder: checks the key-to-note-bin table for all 16 keys, with
// and without a key having been pressed.  The expected bins are written
// here from the note table (E 18h, A 20h, D 2Bh, G 39h, B 48h, high e 5Fh).
module tb_freq_decoder;
  import tuner_pkg::*;

  key_t key;
  logic key_valid;
  bin_t ref_bin;
  logic ref_valid;
  int   checks = 0, failures = 0;

  freq_decoder dut (.key, .key_valid, .ref_bin, .ref_valid);

  function automatic logic [8:0] expected(int k);
    case (k)
      'hE: return {1'b1, 8'h18};  // low E
      'hA: return {1'b1, 8'h20};  // A
      'hD: return {1'b1, 8'h2B};  // D
      'h0: return {1'b1, 8'h39};  // G
      'hB: return {1'b1, 8'h48};  // B
      'hF: return {1'b1, 8'h5F};  // high e
      default: return 9'h000;
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
        if (v == 1 && {ref_valid, ref_bin} !== expected(k)) begin
          failures++;
          $display("FAIL key=%h got %b/%h exp %h", k, ref_valid, ref_bin, expected(k));
        end
        if (v == 0 && (ref_valid !== 1'b0 || ref_bin !== 8'h00)) begin
          failures++;
          $display("FAIL no key but ref_valid=%b bin=%h", ref_valid, ref_bin);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
