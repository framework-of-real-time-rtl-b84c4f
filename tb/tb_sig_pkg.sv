// tb_sig_pkg: test-signal and coefficient generation shared by the receiver
// and top-level testbenches.
//
// gen_capture: the transmitted bit stream is the 2048-bit test block
// repeated (built here independently of the design: 20 sync bits, Barker-11
// pair, Barker-13 pair, PRBS-9 payload), mapped two bits per 4-QAM symbol
// (00 = +I, 01 = -I, 11 = +Q, 10 = -Q), shaped with raised-cosine pulses
// (roll-off 0.25) at sps samples per symbol (nominal 9.5621 / 4 = 2.390525,
// the symbol length the receiver's timing loop expects), rotated by a carrier phase,
// and quantised to 12 bits with a little noise.
// mf_coefs: 100-tap, 4x interpolating low-pass (windowed sinc, cut-off
// 0.35 cycles per input sample, gain 4 so each polyphase branch has unit
// gain), Q2.16. df_coefs: 50-tap differentiator (delay 24.5 samples,
// Blackman window, gain 1.5), Q2.16.
package tb_sig_pkg;
  localparam real PI = 3.14159265358979;
  localparam real SPS = 9.5621 / 4.0;

  function automatic void make_block(output logic blk [2048]);
    logic [10:0] b11;
    logic [12:0] b13;
    logic [8:0]  l;
    int n;
    b11 = 11'b11100010010; b13 = 13'b1111100110101;
    n = 0;
    for (int k = 0; k < 20; k++) blk[n++] = (k % 4 == 3);
    for (int k = 10; k >= 0; k--) blk[n++] = b11[k];
    blk[n++] = 0;
    for (int k = 10; k >= 0; k--) blk[n++] = ~b11[k];
    blk[n++] = 0;
    for (int k = 12; k >= 0; k--) blk[n++] = b13[k];
    for (int k = 12; k >= 0; k--) blk[n++] = ~b13[k];
    l = 9'h1FF;
    while (n < 2048) begin
      blk[n++] = l[8];
      l = {l[7:0], l[8] ^ l[4]};
    end
  endfunction

  function automatic real rc(real t);   // raised cosine, t in symbols
    real beta, den, s;
    beta = 0.25;
    s = (t == 0.0) ? 1.0 : $sin(PI * t) / (PI * t);
    den = 1.0 - (2.0 * beta * t) * (2.0 * beta * t);
    if (den < 1e-6 && den > -1e-6) return s * PI / 4.0;
    return s * $cos(PI * beta * t) / den;
  endfunction

  // nsamp samples of I and Q; the stream starts at bit 'offset' of the block
  function automatic void gen_capture(int nsamp, int offset, real rot_deg, real amp, real sps,
                                      output int si [], output int sq []);
    logic blk [2048];
    real sym_i [], sym_q [], th;
    int nsym;
    make_block(blk);
    // symbol k (index k + 20 here) is centred at t = k symbols; symbols
    // before the capture exist too, so the signal is present from sample 0
    nsym = int'(nsamp / sps) + 40;
    sym_i = new[nsym]; sym_q = new[nsym];
    for (int k = 0; k < nsym; k++) begin
      logic b1, b0;
      b1 = blk[(offset + 2 * (k - 20) + 4096) % 2048];
      b0 = blk[(offset + 2 * (k - 20) + 4097) % 2048];
      sym_i[k] = (!b1) ? (b0 ? -1.0 : 1.0) : 0.0;
      sym_q[k] = b1 ? (b0 ? 1.0 : -1.0) : 0.0;
    end
    th = rot_deg * PI / 180.0;
    si = new[nsamp]; sq = new[nsamp];
    for (int n = 0; n < nsamp; n++) begin
      real x, y, t;
      int k0;
      x = 0; y = 0;
      t = n / sps;                  // time in symbols
      k0 = int'($floor(t)) + 20;
      for (int k = k0 - 12; k <= k0 + 12; k++) begin
        if (k >= 0 && k < nsym) begin
          real p;
          p = rc(t - (k - 20));
          x += sym_i[k] * p; y += sym_q[k] * p;
        end
      end
      si[n] = int'(amp * (x * $cos(th) - y * $sin(th))) + int'($urandom % 21) - 10;
      sq[n] = int'(amp * (x * $sin(th) + y * $cos(th))) + int'($urandom % 21) - 10;
    end
  endfunction

  function automatic void mf_coefs(output logic signed [17:0] h [100]);
    for (int n = 0; n < 100; n++) begin
      real m, s, w, fc;
      fc = 0.35 / 4.0;              // cycles per interpolated sample
      m = n - 49.5;
      s = $sin(2.0 * PI * fc * m) / (PI * m);
      w = 0.42 - 0.5 * $cos(2.0 * PI * (n + 0.5) / 100.0) + 0.08 * $cos(4.0 * PI * (n + 0.5) / 100.0);
      h[n] = 18'(int'(4.0 * s * w * 65536.0));
    end
  endfunction

  function automatic void df_coefs(output logic signed [17:0] h [50]);
    for (int n = 0; n < 50; n++) begin
      real m, d, w;
      m = n - 24.5;
      // ideal differentiator for a half-sample delay: -sin(pi m) / (pi m^2)
      d = -$sin(PI * m) / (PI * m * m);
      w = 0.42 - 0.5 * $cos(2.0 * PI * (n + 0.5) / 50.0) + 0.08 * $cos(4.0 * PI * (n + 0.5) / 50.0);
      // scaled by 1.5 to use more of the Q2.16 range
      h[n] = 18'(int'(1.5 * d * w * 65536.0));
    end
  endfunction
endpackage
