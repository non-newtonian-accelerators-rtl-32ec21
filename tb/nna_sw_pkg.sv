// nna_sw_pkg: the software side of the Non-Newtonian accelerators, for the
// testbenches. It holds the software version of every sub-accelerator
// (what the software thread runs when a stage is bypassed) and reference
// models of whole accelerators. These are written independently of the RTL:
// the AES S-box is generated by walking the multiplicative group with the
// generator 3, and the FFT/DCT coefficients come from $cos/$sin.
package nna_sw_pkg;
  typedef logic [1023:0] sw_word_t;   // wide enough for any accelerator word

  typedef enum int {K_AES = 0, K_FFT = 1, K_DCT = 2, K_TEST = 3} kind_t;

  // ---------------------------------------------------------------- AES
  byte unsigned sbox_tab [256];
  bit           sbox_ready = 0;

  function automatic byte unsigned rotl8(byte unsigned x, int s);
    return byte'((x << s) | (x >> (8 - s)));
  endfunction

  function automatic void build_sbox();
    byte unsigned p, q, x;
    p = 1; q = 1;
    do begin
      p = p ^ byte'(p << 1) ^ ((p & 8'h80) ? 8'h1b : 8'h00);   // p *= 3
      q = q ^ byte'(q << 1);                                    // q /= 3
      q = q ^ byte'(q << 2);
      q = q ^ byte'(q << 4);
      if (q & 8'h80) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      sbox_tab[p] = x ^ 8'h63;
    end while (p != 1);
    sbox_tab[0] = 8'h63;
    sbox_ready = 1;
  endfunction

  function automatic byte unsigned mul2(byte unsigned a);
    return byte'(a << 1) ^ ((a & 8'h80) ? 8'h1b : 8'h00);
  endfunction

  // One AES-128 round on a {state, key} token, byte arrays column-major.
  function automatic logic [255:0] aes_round_sw(logic [255:0] tok, int r);
    byte unsigned s [16], k [16], t [16], rc;
    if (!sbox_ready) build_sbox();
    for (int i = 0; i < 16; i++) begin
      s[i] = tok[255 - 8*i -: 8];
      k[i] = tok[127 - 8*i -: 8];
    end
    if (r > 0) begin
      rc = 1;
      for (int i = 1; i < r; i++) rc = mul2(rc);
      k[0] ^= sbox_tab[k[13]] ^ rc;
      k[1] ^= sbox_tab[k[14]];
      k[2] ^= sbox_tab[k[15]];
      k[3] ^= sbox_tab[k[12]];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      for (int i = 0; i < 16; i++) t[i] = sbox_tab[s[i]];
      for (int i = 0; i < 16; i++) s[i] = t[(i + 4 * (i % 4)) % 16];   // ShiftRows
      if (r < 10) begin
        for (int c = 0; c < 4; c++) begin
          byte unsigned a0, a1, a2, a3, all;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          all = a0 ^ a1 ^ a2 ^ a3;
          s[4*c]   = a0 ^ all ^ mul2(a0 ^ a1);
          s[4*c+1] = a1 ^ all ^ mul2(a1 ^ a2);
          s[4*c+2] = a2 ^ all ^ mul2(a2 ^ a3);
          s[4*c+3] = a3 ^ all ^ mul2(a3 ^ a0);
        end
      end
    end
    for (int i = 0; i < 16; i++) s[i] ^= k[i];
    for (int i = 0; i < 16; i++) begin
      tok[255 - 8*i -: 8] = s[i];
      tok[127 - 8*i -: 8] = k[i];
    end
    return tok;
  endfunction

  function automatic logic [127:0] aes_encrypt_sw(logic [127:0] pt, logic [127:0] key);
    logic [255:0] t;
    t = {pt, key};
    for (int r = 0; r <= 10; r++) t = aes_round_sw(t, r);
    return t[255:128];
  endfunction

  // ---------------------------------------------------------------- FFT
  function automatic int get_s(sw_word_t w, int idx, int dw);
    logic [31:0] v;
    v = 32'(w[idx*dw +: 32] & ((64'd1 << dw) - 1));
    if (v[dw-1]) v = v | ~((32'd1 << dw) - 1);
    return int'(v);
  endfunction

  function automatic sw_word_t put_s(sw_word_t w, int idx, int dw, int v);
    for (int b = 0; b < dw; b++) w[idx*dw + b] = v[b];
    return w;
  endfunction

  // Arithmetic shift right of a signed int (floor division by 2^s).
  function automatic int asr(longint v, int s);
    return int'(v >>> s);
  endfunction

  function automatic sw_word_t fft_stage_sw(sw_word_t w, int n, int dw, int stage);
    int re [], im [], ore [], oim [];
    int logn, h, src;
    sw_word_t o;
    re = new[n]; im = new[n]; ore = new[n]; oim = new[n];
    logn = $clog2(n);
    for (int k = 0; k < n; k++) begin
      src = k;
      if (stage == 0) begin
        src = 0;
        for (int b = 0; b < logn; b++) if (k & (1 << b)) src |= 1 << (logn - 1 - b);
      end
      re[k] = get_s(w, 2*src + 1, dw);
      im[k] = get_s(w, 2*src, dw);
    end
    h = 1 << stage;
    for (int k = 0; k < n; k++) begin
      if ((k & h) == 0) begin
        real ang;
        int wr, wi, br, bi, sr, si, dr, di;
        longint tr, ti;
        ang = -2.0 * 3.14159265358979323846 * (k % h) / (2.0 * h);
        wr = int'($cos(ang) * 16384.0);
        wi = int'($sin(ang) * 16384.0);
        tr = longint'(re[k+h]) * wr - longint'(im[k+h]) * wi;
        ti = longint'(re[k+h]) * wi + longint'(im[k+h]) * wr;
        br = asr(tr, 14);
        bi = asr(ti, 14);
        ore[k]   = asr(re[k] + br, 1);
        oim[k]   = asr(im[k] + bi, 1);
        ore[k+h] = asr(re[k] - br, 1);
        oim[k+h] = asr(im[k] - bi, 1);
      end
    end
    o = '0;
    for (int k = 0; k < n; k++) begin
      o = put_s(o, 2*k + 1, dw, ore[k]);
      o = put_s(o, 2*k, dw, oim[k]);
    end
    return o;
  endfunction

  // ---------------------------------------------------------------- DCT
  function automatic sw_word_t dct_pass_sw(sw_word_t w, int dw);
    sw_word_t o;
    o = '0;
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 8; k++) begin
        longint acc;
        acc = 8192;
        for (int n = 0; n < 8; n++) begin
          real a;
          int  c;
          a = (k == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
          c = int'(a * $cos((2 * n + 1) * k * 3.14159265358979323846 / 16.0) * 16384.0);
          acc += longint'(get_s(w, 8*r + n, dw)) * c;
        end
        o = put_s(o, 8*k + r, dw, int'(acc >>> 14));
      end
    end
    return o;
  endfunction

  // ---------------------------------------------------------------- TEST
  // Stage i of the toy chain used to test the interconnect: x*3 + i + 1.
  function automatic sw_word_t test_stage_sw(sw_word_t w, int width, int stage);
    sw_word_t m;
    m = (sw_word_t'(1) << width) - 1;
    return (w * 3 + sw_word_t'(stage + 1)) & m;
  endfunction

  // ---------------------------------------------------------------- any
  // Software version of stage `stage` of an accelerator of `nstages` stages.
  // p1 = FFT size or toy word width, dw = sample width.
  function automatic sw_word_t sw_stage(kind_t kind, int stage, int nstages, int p1, int dw,
                                        sw_word_t w);
    sw_word_t o;
    o = w;
    case (kind)
      K_AES: begin
        int first, last;
        first = (11 * stage) / nstages;
        last  = (11 * (stage + 1)) / nstages - 1;
        for (int r = first; r <= last; r++) o[255:0] = aes_round_sw(o[255:0], r);
        o[1023:256] = '0;
      end
      K_FFT:  o = fft_stage_sw(w, p1, dw, stage);
      K_DCT:  o = dct_pass_sw(w, dw);
      K_TEST: o = test_stage_sw(w, p1, stage);
      default: o = w;
    endcase
    return o;
  endfunction
  // ------------------------------------------------ jobs and references
  // A random input word for an accelerator.
  function automatic sw_word_t make_job(kind_t kind, int p1, int dw);
    sw_word_t w;
    w = '0;
    case (kind)
      K_AES: for (int i = 0; i < 8; i++) w[32*i +: 32] = $urandom;
      K_FFT: for (int i = 0; i < 2 * p1; i++) w = put_s(w, i, dw, int'($urandom_range(0, 8190)) - 4095);
      K_DCT: for (int i = 0; i < 64; i++) w = put_s(w, i, dw, int'($urandom_range(0, 255)) - 128);
      default: for (int i = 0; i < p1; i++) w[i] = 1'($urandom);
    endcase
    return w;
  endfunction

  // All stages in software: the result the accelerator must return.
  function automatic sw_word_t chain_sw(kind_t kind, int nstages, int p1, int dw, sw_word_t w);
    for (int s = 0; s < nstages; s++) w = sw_stage(kind, s, nstages, p1, dw, w);
    return w;
  endfunction

  // Check a result against the mathematical definition (floating point for
  // FFT and DCT, with a tolerance for the fixed-point rounding).
  function automatic bit ref_ok(kind_t kind, int p1, int dw, sw_word_t job, sw_word_t res);
    real pi;
    pi = 3.14159265358979323846;
    case (kind)
      K_AES: return res[255:128] == aes_encrypt_sw(job[255:128], job[127:0]);
      K_FFT: begin
        for (int k = 0; k < p1; k++) begin
          real er, ei;
          er = 0.0; ei = 0.0;
          for (int n = 0; n < p1; n++) begin
            real a;
            a = -2.0 * pi * k * n / p1;
            er += get_s(job, 2*n + 1, dw) * $cos(a) - get_s(job, 2*n, dw) * $sin(a);
            ei += get_s(job, 2*n + 1, dw) * $sin(a) + get_s(job, 2*n, dw) * $cos(a);
          end
          er = er / p1; ei = ei / p1;
          if ((er - get_s(res, 2*k + 1, dw)) > 4.0 || (get_s(res, 2*k + 1, dw) - er) > 4.0 ||
              (ei - get_s(res, 2*k, dw)) > 4.0 || (get_s(res, 2*k, dw) - ei) > 4.0) begin
            $display("FFT bin %0d: got (%0d,%0d) exp (%f,%f)", k,
                     get_s(res, 2*k + 1, dw), get_s(res, 2*k, dw), er, ei);
            return 0;
          end
        end
        return 1;
      end
      K_DCT: begin
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            real e, au, av;
            au = (u == 0) ? $sqrt(0.125) : 0.5;
            av = (v == 0) ? $sqrt(0.125) : 0.5;
            e = 0.0;
            for (int x = 0; x < 8; x++)
              for (int y = 0; y < 8; y++)
                e += get_s(job, 8*x + y, dw) * $cos((2*x + 1) * u * pi / 16.0)
                                             * $cos((2*y + 1) * v * pi / 16.0);
            e = e * au * av;
            if ((e - get_s(res, 8*u + v, dw)) > 2.0 || (get_s(res, 8*u + v, dw) - e) > 2.0) begin
              $display("DCT (%0d,%0d): got %0d exp %f", u, v, get_s(res, 8*u + v, dw), e);
              return 0;
            end
          end
        return 1;
      end
      default: return 1;
    endcase
  endfunction
endpackage
