// tb_frame_gen: random frame contents for the decoder testbenches.
// make_frame() picks max_sfb, a codebook per band, scale factors (a random
// walk that keeps each difference within the +-60 range of the scale factor
// book) and quantized values inside each book's range; codebook 11 bands get
// some escape values up to 8191. Mode 1 gives every band codebook 11, so the
// section length needs its escape value 31; mode 2 makes small values only.
package tb_frame_gen;
  import tb_aac_pkg::*;

  function automatic void make_frame(input int mode, output int gg, output int max_sfb,
                                     output int sfb_cb[49], output int sf[49], output int spec[1024]);
    int s;
    gg = $urandom_range(90, 130);
    max_sfb = (mode == 1) ? 49 : $urandom_range(20, 49);
    s = gg;
    for (int i = 0; i < 1024; i++) spec[i] = 0;
    for (int b = 0; b < 49; b++) begin
      sfb_cb[b] = 0; sf[b] = 0;
      if (b >= max_sfb) continue;
      sfb_cb[b] = (mode == 1) ? 11 : $urandom_range(0, 11);
      if (mode == 2 && sfb_cb[b] > 4) sfb_cb[b] = $urandom_range(1, 4);
      if (sfb_cb[b] != 0) begin
        s = s + $urandom_range(0, 20) - 10;
        if (s < 60) s = 60;
        if (s > 200) s = 200;
        sf[b] = s;
      end
      for (int i = swb(b); i < swb(b + 1); i++) begin
        int lav, v;
        if (sfb_cb[b] == 0) continue;
        lav = cb_lav(sfb_cb[b]);
        v = $urandom_range(0, lav);
        if (sfb_cb[b] == 11 && $urandom_range(0, 9) == 0) v = $urandom_range(16, 8191);
        if ($urandom_range(0, 1)) v = -v;
        spec[i] = v;
      end
    end
  endfunction
endpackage
