// sea_ref_pkg: behavioural reference model of SEA_{n,b} for the testbenches.
//
// Written independently of the RTL: words are taken out of and put back into
// wide vectors one by one, the S-box is a lookup table rather than bitsliced
// logic, and the key schedule is computed as a whole list of round keys
// exactly as the algorithm describes it (switch of KL/KR after round
// floor(n_r/2), KR of that round used before the switch), instead of the
// loop hardware's swapped register storage. Sizes are run-time arguments,
// so one model serves every parameter set; a half (n/2 bits) may have up to
// MAXH bits and a word up to 16 bits.
package sea_ref_pkg;

  localparam int MAXH = 256;
  typedef logic [MAXH-1:0] half_t;

  // S-box table: input value = {x_3i+2, x_3i+1, x_3i} bit j
  localparam int SBOX [8] = '{0, 5, 7, 6, 4, 3, 1, 2};

  function automatic int unsigned get_w(half_t v, int b, int i);
    half_t t;
    t = v >> (b * i);
    return int'(t[15:0]) & ((1 << b) - 1);
  endfunction

  function automatic half_t put_w(half_t v, int b, int i, int unsigned w);
    half_t m, t;
    int unsigned mask, wm;
    mask = (32'd1 << b) - 32'd1;
    wm = w & mask;
    m = half_t'(mask) << (b * i);
    t = half_t'(wm) << (b * i);
    return (v & ~m) | t;
  endfunction

  // One word addition: arch 1 modulo 2^b, arch 2/3 modulo 2^b-1 per Eq. (3.3)
  function automatic int unsigned add_w(int unsigned x, int unsigned y, int b, int arch);
    int unsigned s, m;
    m = 1 << b;
    s = x + y;
    if (arch == 1) return s % m;
    if (s >= m) return (s + 1) % m;
    return s;
  endfunction

  function automatic half_t vadd(half_t x, half_t y, int nb, int b, int arch);
    half_t z = '0;
    for (int i = 0; i < nb; i++) z = put_w(z, b, i, add_w(get_w(x, b, i), get_w(y, b, i), b, arch));
    return z;
  endfunction

  function automatic half_t sbox(half_t x, int nb, int b);
    half_t y = '0;
    for (int g = 0; g < nb / 3; g++) begin
      int unsigned a, bb, c, oa, ob, oc;
      a = get_w(x, b, 3*g); bb = get_w(x, b, 3*g+1); c = get_w(x, b, 3*g+2);
      oa = 0; ob = 0; oc = 0;
      for (int j = 0; j < b; j++) begin
        int v, s;
        v = ((a >> j) & 1) | (((bb >> j) & 1) << 1) | (((c >> j) & 1) << 2);
        s = SBOX[v];
        oa |= (s & 1) << j;
        ob |= ((s >> 1) & 1) << j;
        oc |= ((s >> 2) & 1) << j;
      end
      y = put_w(y, b, 3*g, oa); y = put_w(y, b, 3*g+1, ob); y = put_w(y, b, 3*g+2, oc);
    end
    return y;
  endfunction

  function automatic int unsigned rotr1(int unsigned w, int b);
    return ((w >> 1) | ((w & 1) << (b - 1))) & ((1 << b) - 1);
  endfunction

  function automatic int unsigned rotl1(int unsigned w, int b);
    return ((w << 1) | (w >> (b - 1))) & ((1 << b) - 1);
  endfunction

  // bit rotation r
  function automatic half_t brot(half_t x, int nb, int b);
    half_t y = x;
    for (int g = 0; g < nb / 3; g++) begin
      y = put_w(y, b, 3*g, rotr1(get_w(x, b, 3*g), b));
      y = put_w(y, b, 3*g+2, rotl1(get_w(x, b, 3*g+2), b));
    end
    return y;
  endfunction

  // word rotation R (inv = 0) or R^-1 (inv = 1)
  function automatic half_t wrot(half_t x, int nb, int b, bit inv);
    half_t y = '0;
    for (int i = 0; i < nb; i++) begin
      if (!inv) y = put_w(y, b, (i + 1) % nb, get_w(x, b, i));
      else      y = put_w(y, b, i, get_w(x, b, (i + 1) % nb));
    end
    return y;
  endfunction

  function automatic half_t ff(half_t x, half_t k, int nb, int b, int arch);
    return brot(sbox(vadd(x, k, nb, b, arch), nb, b), nb, b);
  endfunction

  // one cipher round, F_E or F_D
  function automatic void round_f(input half_t l, input half_t r, input half_t k,
                                  input int nb, input int b, input int arch, input bit dec,
                                  output half_t lo, output half_t ro);
    if (!dec) ro = wrot(l, nb, b, 0) ^ ff(r, k, nb, b, arch);
    else      ro = wrot(l ^ ff(r, k, nb, b, arch), nb, b, 1);
    lo = r;
  endfunction

  // one key round F_K with constant C(i)
  function automatic void key_round_f(input half_t kl, input half_t kr, input int i,
                                      input int nb, input int b, input int arch,
                                      output half_t klo, output half_t kro);
    half_t c;
    c = put_w('0, b, 0, i);
    kro = kl ^ wrot(brot(sbox(vadd(kr, c, nb, b, arch), nb, b), nb, b), nb, b, 0);
    klo = kr;
  endfunction

  // whole operation: text = L & R, key = KL & KR, returns R_nr & L_nr
  function automatic void sea(input half_t l0, input half_t r0, input half_t kl0, input half_t kr0,
                              input int nb, input int b, input int nr, input int arch, input bit dec,
                              output half_t out_hi, output half_t out_lo);
    half_t kl[], kr[];
    half_t kr_mid, t, l, r, k, lo, ro;
    int h;
    h = nr / 2;
    kl = new[nr]; kr = new[nr];
    kl[0] = kl0; kr[0] = kr0;
    for (int i = 1; i <= h; i++) key_round_f(kl[i-1], kr[i-1], i, nb, b, arch, kl[i], kr[i]);
    kr_mid = kr[h];
    t = kl[h]; kl[h] = kr[h]; kr[h] = t;  // switch
    for (int i = h + 1; i <= nr - 1; i++) key_round_f(kl[i-1], kr[i-1], nr - i, nb, b, arch, kl[i], kr[i]);
    l = l0; r = r0;
    for (int i = 1; i <= nr; i++) begin
      if (i <= h) k = kr[i-1];
      else if (i == h + 1) k = kr_mid;
      else k = kl[i-1];
      round_f(l, r, k, nb, b, arch, dec, lo, ro);
      l = lo; r = ro;
    end
    out_hi = r;
    out_lo = l;
  endfunction

endpackage
