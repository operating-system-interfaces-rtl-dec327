// osif_ref_pkg: reference models used by the testbenches, written directly
// from the arithmetic definitions (full-search SAD, madplay-style linear
// dither, real-valued DCT, rounded division) and independent of the RTL's
// structure.
package osif_ref_pkg;

  // ------------------------------------------------------------ dither
  typedef struct {
    int e0, e1, e2;
    int unsigned rnd;
  } dither_state_t;

  function automatic shortint dither_ref(ref dither_state_t st, input int x);
    int s, y, mask, vmax, vmin;
    int unsigned r2;
    mask = (1 << 13) - 1;
    vmax = (1 << 28) - 1;
    vmin = -(1 << 28);
    s = x + st.e0 - st.e1 + st.e2;
    st.e2 = st.e1;
    st.e1 = st.e0 / 2;
    y = s + (1 << 12);
    r2 = st.rnd * 32'h0019660D + 32'h3C6EF35F;
    y = y + int'(r2 & mask) - int'(st.rnd & mask);
    st.rnd = r2;
    if (y > vmax) begin
      y = vmax;
      if (s > vmax) s = vmax;
    end else if (y < vmin) begin
      y = vmin;
      if (s < vmin) s = vmin;
    end
    y = y & ~mask;
    st.e0 = s - y;
    return shortint'(y >>> 13);
  endfunction

  // ------------------------------------------------------------ DCT
  typedef shortint block_t [64];

  function automatic int dct_ref(const ref block_t x, input int v, input int u);
    real acc, cu, cv;
    acc = 0.0;
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++)
        acc += real'(x[8*r + k]) * $cos((2*r + 1) * v * 3.14159265358979 / 16.0)
                                 * $cos((2*k + 1) * u * 3.14159265358979 / 16.0);
    cu = (u == 0) ? 0.70710678118654752 : 1.0;
    cv = (v == 0) ? 0.70710678118654752 : 1.0;
    acc = acc * cu * cv / 4.0;
    return (acc >= 0.0) ? int'($floor(acc + 0.5)) : -int'($floor(-acc + 0.5));
  endfunction

  // ------------------------------------------------------------ quantiser
  localparam int QTAB_REF [64] = '{
     8,  6,  5,  8, 12, 20, 26, 31,   6,  6,  7, 10, 13, 29, 30, 28,
     7,  7,  8, 12, 20, 29, 35, 28,   7,  9, 11, 15, 26, 44, 40, 31,
     9, 11, 19, 28, 34, 55, 52, 39,  12, 18, 28, 32, 41, 52, 57, 46,
    25, 32, 39, 44, 52, 61, 60, 51,  36, 46, 48, 49, 56, 50, 52, 50};

  function automatic int quant_ref(input int c, input int q);
    int m;
    m = (c < 0) ? -c : c;
    m = (m + q / 2) / q;
    return (c < 0) ? -m : m;
  endfunction

  // ------------------------------------------------------------ motion estimation
  typedef byte unsigned mb_t [256];
  typedef byte unsigned sa_t [961];

  // best (dx, dy) in 0..15 by smallest SAD, first in dy-major order on a tie
  function automatic void me_ref(const ref mb_t mb, const ref sa_t sa,
                                 output int best_dx, output int best_dy, output int best_sad);
    best_sad = 1 << 30;
    best_dx = 0;
    best_dy = 0;
    for (int dy = 0; dy < 16; dy++)
      for (int dx = 0; dx < 16; dx++) begin
        int sad;
        sad = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            int d;
            d = int'(mb[16*r + c]) - int'(sa[31*(r + dy) + c + dx]);
            sad += (d < 0) ? -d : d;
          end
        if (sad < best_sad) begin
          best_sad = sad;
          best_dx = dx;
          best_dy = dy;
        end
      end
  endfunction

endpackage
