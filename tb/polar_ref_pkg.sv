// polar_ref_pkg: behavioural reference for the testbenches.
//
// Integer models of polar encoding and of 2-bit SC decoding with q-bit
// saturating LLR arithmetic. The decoder model recomputes every LLR from
// the channel values for each bit pair, walking from the root of the SC tree
// to the pair, and takes its partial sums by re-encoding the already decided
// bits, so it shares no structure with the RTL (no registers, no PSN).
// Decision rule at the last stage:
//   u_odd  = ~frozen & (c < 0) ^ (d < 0)
//   u_even = ~frozen & (g < 0, or g == 0 and c < 0), g = d + (-1)^u_odd c
// (ties on a zero value go the way the hardware's sign/compare logic sends
// them).
package polar_ref_pkg;
  import polar_pkg::*;

  function automatic int to_int(input llr_t v);
    return v.sign ? -int'(v.mag) : int'(v.mag);
  endfunction

  function automatic llr_t to_sm(input int v);
    llr_t r;
    r.sign = v < 0;
    r.mag  = MAG_W'(v < 0 ? -v : v);
    return r;
  endfunction

  localparam int NMAX = 64;

  typedef int  ivec_t [NMAX];
  typedef bit  bvec_t [NMAX];

  function automatic int sat(input int v, input int q);
    int lim = (1 << (q - 1)) - 1;
    if (v >  lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  function automatic int fmin(input int a, input int b);
    int ma = a < 0 ? -a : a;
    int mb = b < 0 ? -b : b;
    int m  = ma < mb ? ma : mb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // x = u * G_n, straight from the definition G(i,j) = 1 iff j is a
  // bitwise subset of i
  function automatic bvec_t encode(input bvec_t u, input int n);
    bvec_t x;
    for (int j = 0; j < NMAX; j++) x[j] = 0;
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++)
        if ((j & ~i) == 0) x[j] ^= u[i];
    return x;
  endfunction

  // one sub-block of partial sums: encoding of u[base +: len]
  function automatic bvec_t encode_sub(input bvec_t u, input int base, input int len);
    bvec_t t;
    for (int j = 0; j < NMAX; j++) t[j] = 0;
    for (int j = 0; j < len; j++) t[j] = u[base + j];
    return encode(t, len);
  endfunction

  typedef struct {
    int psum_one;      // g candidates chosen with partial sum 1
    int psum_zero;     // g candidates chosen with partial sum 0
    int sat_hits;      // g results clipped to the q-bit range
    int pn_case [4];   // p node calls by {frozen1, frozen2}
  } stats_t;

  function automatic bvec_t sc_decode(input ivec_t llr, input bvec_t frozen,
                                      input int n, input int q,
                                      inout stats_t st);
    bvec_t u;
    ivec_t v, nv;
    int    len, base, half, c, d, g;
    bvec_t ps;
    for (int i = 0; i < NMAX; i++) u[i] = 0;
    for (int b = 0; b < n; b += 2) begin
      for (int i = 0; i < n; i++) v[i] = llr[i];
      len  = n;
      base = 0;
      while (len > 2) begin
        half = len / 2;
        if (b - base < half) begin
          for (int k = 0; k < half; k++) nv[k] = fmin(v[k], v[k + half]);
        end else begin
          ps = encode_sub(u, base, half);
          for (int k = 0; k < half; k++) begin
            g = ps[k] ? v[k + half] - v[k] : v[k + half] + v[k];
            if (ps[k]) st.psum_one++; else st.psum_zero++;
            if (sat(g, q) != g) st.sat_hits++;
            nv[k] = sat(g, q);
          end
          base += half;
        end
        for (int k = 0; k < half; k++) v[k] = nv[k];
        len = half;
      end
      c = v[0];
      d = v[1];
      st.pn_case[{frozen[b], frozen[b+1]}]++;
      u[b] = frozen[b] ? 1'b0 : bit'((c < 0) ^ (d < 0));
      g = u[b] ? d - c : d + c;
      u[b+1] = frozen[b+1] ? 1'b0 : bit'(g < 0 || (g == 0 && c < 0));
    end
    return u;
  endfunction

endpackage
