// hc11_model: behavioural model of the microcontroller program that feeds the
// tuner FPGA.  Not synthesizable; used by testbenches only.
//
// measure(freq_hz) plays a sine tone into the model and reproduces, byte for
// byte, what the 8-bit program does with it:
//   1. 256 A/D samples, 8-bit, at SAMPLE_HZ, stored as bytes that the FFT
//      treats as two's complement (the tone is given an offset that keeps
//      every sample between 0 and 127);
//   2. bit-reversed reordering of the 256 points;
//   3. first butterfly pass with twiddle +1/-1 (sum and difference of
//      neighbours), 8-bit wrapping adds;
//   4. seven further passes using a 256-entry cosine table of
//      round(127*cos(2*pi*i/256)) (sine read 64 entries on), a signed 8x8
//      multiply that keeps round(|a*b|/256)*2, and before every pass a
//      range check that halves all points once (arithmetic shift) if any
//      point lies outside -63..+64; entries 0 and 64 of the real part are
//      cleared before every pass to keep the large DC term from forcing
//      the scaling;
//   5. absolute value of the 256 real results;
//   6. search of bins 127 down to 2 for a value larger (signed) than bin 1,
//      keeping the highest-numbered bin among equals; if none beats bin 1
//      the bin of the previous measurement is kept;
//   7. the bin is driven on portb.
// found tells whether step 6 found a new bin.  SAMPLE_HZ: see tb_tuner_notes for how the default was chosen.
module hc11_model #(
  parameter real SAMPLE_HZ = 1767.7,  // effective A/D sampling rate
  parameter real OFFSET    = 48.0,    // A/D counts of the signal's offset
  parameter real AMPLITUDE = 40.0     // A/D counts of the tone's amplitude
) (
  output logic [7:0] portb
);

  byte       re [256];
  byte       im [256];
  byte       costab [256];
  logic [7:0] save_bin = 8'd1;

  initial begin
    portb = 8'd1;
    for (int i = 0; i < 256; i++) begin
      real x;
      x = 127.0 * $cos(2.0 * 3.14159265358979 * i / 256.0);
      costab[i] = byte'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5));
    end
  end

  // signed 8x8 multiply of the program, result scaled by 1/128
  function automatic byte smul(byte a, byte b);
    logic [7:0]  ua, ub;
    logic [15:0] p;
    logic [7:0]  r;
    if (a == -128 || b == -128) return 0;
    ua = (a < 0) ? 8'(-a) : 8'(a);
    ub = (b < 0) ? 8'(-b) : 8'(b);
    p  = ua * ub;
    r  = p[15:8] + 8'(p[7]);
    r  = r << 1;
    if ((a ^ b) < 0) r = -r;
    return byte'(r);
  endfunction

  // halve every point once if any is outside -63..+64 (DC real excluded)
  function automatic void scale();
    bit over = 0;
    for (int i = 1; i < 512; i++) begin
      byte v = (i < 256) ? re[i] : im[i-256];
      if (v > 64 || v < -63) over = 1;
    end
    if (over)
      for (int i = 1; i < 512; i++)
        if (i < 256) re[i] = re[i] >>> 1;
        else         im[i-256] = im[i-256] >>> 1;
  endfunction

  function automatic logic [7:0] bitrev(logic [7:0] v);
    for (int i = 0; i < 8; i++) bitrev[i] = v[7-i];
  endfunction

  task automatic measure(input real freq_hz, output logic [7:0] bin, output bit found);
    int celnm, pairnm, celdis, delta;
    // 1. sampling
    for (int n = 0; n < 256; n++) begin
      real s;
      s = OFFSET + AMPLITUDE * $sin(2.0 * 3.14159265358979 * freq_hz * n / SAMPLE_HZ);
      re[n] = byte'($rtoi(s + 0.5));
      im[n] = 0;
    end
    // 2. bit reversal
    for (int a = 1; a < 255; a++) begin
      int b = int'(bitrev(8'(a)));
      if (a < b) begin byte t = re[a]; re[a] = re[b]; re[b] = t; end
    end
    // 3. first pass
    scale();
    for (int m = 0; m < 256; m += 2) begin
      byte rm = re[m], rn = re[m+1];
      re[m]   = byte'(rm + rn);
      re[m+1] = byte'(rm - rn);
    end
    // 4. passes 2..8
    celnm = 64; delta = 64; pairnm = 2; celdis = 2;
    while (celnm != 0) begin
      int r1 = 0;
      scale();
      re[0]  = 0;
      re[64] = 0;
      for (int c = 0; c < celnm; c++) begin
        int sp = 0;
        for (int p = 0; p < pairnm; p++) begin
          byte ca = costab[sp], sa = costab[sp + 64];
          int  r2 = r1 + celdis;
          byte tr, ti, rm, imv;
          tr = smul(re[r2], ca);
          ti = smul(re[r2], sa);
          tr = byte'(smul(im[r2], sa) + tr);
          ti = byte'(smul(im[r2], ca) - ti);
          rm = re[r1];
          re[r1] = byte'(rm + tr);
          re[r2] = byte'(rm - tr);
          imv = im[r1];
          im[r1] = byte'(imv + ti);
          im[r2] = byte'(imv - ti);
          r1++;
          sp += delta;
        end
        r1 += celdis;
      end
      celnm  >>= 1;
      pairnm <<= 1;
      celdis <<= 1;
      delta  >>= 1;
    end
    // 5. absolute value
    for (int i = 0; i < 256; i++) if (re[i] < 0) re[i] = byte'(-re[i]);
    // 6. strongest bin
    begin
      byte best = re[1];
      found = 0;
      for (int i = 127; i >= 2; i--)
        if (re[i] > best) begin best = re[i]; save_bin = 8'(i); found = 1; end
    end
    bin   = save_bin;
    portb = save_bin;
  endtask

endmodule
