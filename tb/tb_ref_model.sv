// tb_ref_model: floating point reference of the whole core unit for one
// long-window frame: inverse quantization and rescaling (tb_aac_pkg::iq_ref,
// same fixed-point scale as the hardware), the textbook IMDCT
// y[n] = sum_k X[k] cos(2 pi/2048 (n + 512.5)(k + 1/2)), sine or KBD
// (alpha 4) windowing with the previous frame's shape on the rising half,
// overlap-add with the stream's previous frame, and 16-bit PCM rounding and
// clipping of a value with 14 fraction bits.
package tb_ref_model;
  import tb_aac_pkg::*;

  typedef struct {
    real ov [1024];
    bit  shape;
  } chan_state_t;

  real costab [8192];
  real wsin [1024];
  real wkbd [1024];
  bit  ready = 0;

  function automatic void init();
    real tot, acc, wk [1025];
    for (int m = 0; m < 8192; m++) costab[m] = $cos(2.0 * 3.14159265358979323846 * m / 8192.0);
    tot = 0;
    for (int j = 0; j <= 1024; j++) begin
      real u, x, s, t;
      u = (j - 512.0) / 512.0;
      x = 3.14159265358979323846 * 4.0 * $sqrt(1.0 - u * u);
      s = 1.0; t = 1.0;
      for (int k = 1; k < 60; k++) begin t = t * x / (2.0 * k); s += t * t; end
      wk[j] = s; tot += s;
    end
    acc = 0;
    for (int n = 0; n < 1024; n++) begin
      acc += wk[n];
      wkbd[n] = $sqrt(acc / tot);
      wsin[n] = $sin(3.14159265358979323846 * (n + 0.5) / 2048.0);
    end
    ready = 1;
  endfunction

  function automatic void decode(input int spec[1024], input int sf[49], input bit shape,
                                 inout chan_state_t st, output int pcm[1024]);
    real X [1024];
    real y [2048];
    if (!ready) init();
    for (int b = 0; b < 49; b++)
      for (int k = swb(b); k < swb(b + 1); k++) X[k] = iq_ref(spec[k], sf[b], 1'b0);
    for (int n = 0; n < 2048; n++) begin
      real s;
      s = 0;
      for (int k = 0; k < 1024; k++)
        if (X[k] != 0.0) s += X[k] * costab[((2 * n + 1025) * (2 * k + 1)) % 8192];
      y[n] = s;
    end
    for (int n = 0; n < 1024; n++) begin
      real v, r;
      v = y[n] * (st.shape ? wkbd[n] : wsin[n]) + st.ov[n];
      st.ov[n] = y[1024 + n] * (shape ? wkbd[1023 - n] : wsin[1023 - n]);
      r = v / 16384.0;
      r = r + (r >= 0 ? 0.5 : -0.5);
      if (r > 32767.0) r = 32767.0;
      if (r < -32768.0) r = -32768.0;
      pcm[n] = $rtoi(r);
    end
    st.shape = shape;
  endfunction
endpackage
