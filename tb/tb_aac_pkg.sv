// tb_aac_pkg: testbench helpers for the AAC decoder testbenches.
//
// Codebooks: the testbenches load every Huffman codebook with an
// Exp-Golomb code of the entry index (index r gets the code of r+1 written
// in b bits after b-1 zeros), a valid prefix code with lengths up to 17
// bits, so that frames can be built without the standard's tables. Tuple
// indexing follows the AAC books: 4-tuples (books 1-4) index
// w*27 + x*9 + y*3 + z, 2-tuples index y*M + z, with signed books offset by
// their largest value. encode_frame() builds a complete ADTS frame (header,
// single channel element with long window, section data, scale factors,
// spectral data with sign bits and escapes, ID_END) as 32-bit words.
package tb_aac_pkg;

  typedef bit bitq_t[$];

  function automatic void eg_code(input int r, output logic [20:0] code, output int len);
    int b, v;
    v = r + 1;
    b = 0;
    while ((v >> b) != 0) b++;
    len  = 2 * b - 1;
    code = 21'(v) << (21 - len);
  endfunction

  function automatic bit cb_quad(int cb);      return cb >= 1 && cb <= 4; endfunction
  function automatic bit cb_unsigned(int cb);  return !(cb == 1 || cb == 2 || cb == 5 || cb == 6); endfunction
  function automatic int cb_lav(int cb);
    case (cb)
      1, 2: return 1;  3, 4: return 2;  5, 6: return 4;
      7, 8: return 7;  9, 10: return 12; default: return 16;
    endcase
  endfunction
  function automatic int cb_entries(int cb);
    case (cb)
      1,2,3,4,5,6: return 81; 7,8: return 64; 9,10: return 169; 11: return 289; default: return 121;
    endcase
  endfunction

  // decode an entry index to the stored tuple {w,x,y,z}, 6 bits each
  function automatic logic [23:0] entry_tuple(int cb, int idx);
    int w, x, y, z, off, m;
    w = 0; x = 0;
    if (cb_quad(cb)) begin
      off = cb_unsigned(cb) ? 0 : 1;
      w = idx / 27 - off; x = (idx / 9) % 3 - off; y = (idx / 3) % 3 - off; z = idx % 3 - off;
    end else begin
      off = cb_unsigned(cb) ? 0 : cb_lav(cb);
      m   = cb_unsigned(cb) ? cb_lav(cb) + 1 : 2 * cb_lav(cb) + 1;
      w = idx / m - off; x = idx % m - off; y = 0; z = 0;
    end
    return {6'(w), 6'(x), 6'(y), 6'(z)};
  endfunction

  function automatic int tuple_index(int cb, int v[4]);
    int off, m;
    if (cb_quad(cb)) begin
      off = cb_unsigned(cb) ? 0 : 1;
      return (v[0] + off) * 27 + (v[1] + off) * 9 + (v[2] + off) * 3 + (v[3] + off);
    end
    off = cb_unsigned(cb) ? 0 : cb_lav(cb);
    m   = cb_unsigned(cb) ? cb_lav(cb) + 1 : 2 * cb_lav(cb) + 1;
    return (v[0] + off) * m + (v[1] + off);
  endfunction

  function automatic void put(ref bitq_t q, input longint val, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((val >> i) & 1));
  endfunction

  function automatic void put_code(ref bitq_t q, input int r);
    logic [20:0] c; int l;
    eg_code(r, c, l);
    for (int i = 0; i < l; i++) q.push_back(c[20 - i]);
  endfunction

  function automatic int swb(int sfb);
    int t[50] = '{0,4,8,12,16,20,24,28,32,36,40,48,56,64,72,80,88,96,108,120,132,144,160,176,196,
                  216,240,264,292,320,352,384,416,448,480,512,544,576,608,640,672,704,736,768,800,
                  832,864,896,928,1024};
    return t[sfb];
  endfunction

  // Build one ADTS frame. sfb_cb/sf cover bands 0..max_sfb-1; spec has 1024
  // quantized values (zero outside coded bands, within each book's range).
  function automatic void encode_frame(input int global_gain, input int win_shape,
                                       input int max_sfb, input int sfb_cb[49], input int sf[49],
                                       input int spec[1024], input bit with_crc,
                                       ref bitq_t q);
    int prev, k, dim, run;
    q.delete();
    put(q, 12'hFFF, 12);
    put(q, 0, 1); put(q, 0, 2); put(q, with_crc ? 0 : 1, 1);   // ID, layer, protection_absent
    put(q, 1, 2); put(q, 3, 4); put(q, 0, 1); put(q, 1, 3);    // profile LC, 48 kHz, mono
    put(q, 0, 4);                                              // orig, home, copyright bits
    put(q, 0, 13); put(q, 11'h7FF, 11); put(q, 0, 2);          // length, fullness, blocks
    if (with_crc) put(q, 16'hABCD, 16);
    put(q, 0, 3); put(q, 0, 4); put(q, global_gain, 8);        // SCE, tag, global_gain
    put(q, 0, 1); put(q, 0, 2); put(q, win_shape, 1);          // ics_info
    put(q, max_sfb, 6); put(q, 0, 1);
    // section data
    k = 0;
    while (k < max_sfb) begin
      run = 1;
      while (k + run < max_sfb && sfb_cb[k + run] == sfb_cb[k]) run++;
      put(q, sfb_cb[k], 4);
      begin
        int l; l = run;
        while (l >= 31) begin put(q, 31, 5); l -= 31; end
        put(q, l, 5);
      end
      k += run;
    end
    // scale factors
    prev = global_gain;
    for (int b = 0; b < max_sfb; b++) begin
      if (sfb_cb[b] != 0) begin
        put_code(q, sf[b] - prev + 60);
        prev = sf[b];
      end
    end
    put(q, 0, 3);   // pulse, tns, gain control
    // spectral data
    for (int b = 0; b < max_sfb; b++) begin
      int cb;
      cb = sfb_cb[b];
      if (cb == 0) continue;
      dim = cb_quad(cb) ? 4 : 2;
      for (int i = swb(b); i < swb(b + 1); i += dim) begin
        int v[4], a[4];
        for (int j = 0; j < 4; j++) begin
          v[j] = (j < dim) ? spec[i + j] : 0;
          a[j] = v[j] < 0 ? -v[j] : v[j];
          if (cb == 11 && a[j] > 16) a[j] = 16;
        end
        if (cb_unsigned(cb)) put_code(q, tuple_index(cb, a));
        else                 put_code(q, tuple_index(cb, v));
        if (cb_unsigned(cb))
          for (int j = 0; j < dim; j++) if (a[j] != 0) put(q, v[j] < 0, 1);
        if (cb == 11)
          for (int j = 0; j < 2; j++) if (a[j] == 16) begin
            int m, n;
            m = v[j] < 0 ? -v[j] : v[j];
            n = 0;
            while ((m >> (n + 5)) != 0) n++;
            for (int t = 0; t < n; t++) put(q, 1, 1);
            put(q, 0, 1);
            put(q, m - (1 << (n + 4)), n + 4);
          end
      end
    end
    put(q, 7, 3);   // ID_END
    while (q.size() % 32 != 0) q.push_back(1'b0);
  endfunction

  // Floating point model of inverse quantization and rescaling, in the
  // fixed-point scale of the IQ output: 14 fraction bits, 2^-7 pre-scaling.
  function automatic real iq_ref(int qv, int sf, bit short_win);
    real m;
    m = $pow((qv < 0 ? -qv : qv), 4.0 / 3.0) * $pow(2.0, 0.25 * (sf - 100));
    m = m * 16384.0 / (short_win ? 16.0 : 128.0);
    return qv < 0 ? -m : m;
  endfunction

endpackage
