// mrrns_pkg: constants and elaboration-time functions shared by the
// modulus-replication (MRRNS) FIR filter.
//
// The filter computes over the Fermat prime fields GF(257) and GF(17), both
// of the form p = 2^NB + 1 (NB = 8 and NB = 4).  Three number codes appear:
//   * normal form      : the residue v in 0..p-1;
//   * diminished-one   : v-1 in NB bits for v != 0, and 1 << NB for v = 0;
//   * index form       : {NAN, k} with g^k = v (g = 3), NAN = 1 for v = 0.
// A MAC accumulator travels as a diminished-one code s plus a pending carry c
// whose inverse (1-c) still has to be added at the LSB; the code it stands for
// is s + (1-c), and s has its MSB set only together with c = 1.
//
// The functions below build the ROM contents (antilog, discrete log), the
// forward Vandermonde weights and the inverse Vandermonde weights at
// elaboration time, so no table is stored in a file.  The data polynomial
// uses the indeterminate X = 8 (3-bit digits d0, d1, d2) plus the sign bit of
// the 10-bit two's complement sample, whose weight -512 = -8 * X^2 is folded
// into the X^2 coefficient; a sample thus has three polynomial coefficients
// and four inputs to the forward map.  Products of two such polynomials have
// five coefficients, recovered exactly by evaluation at D = 5 points.  The
// evaluation points {0, 1, -1, 2, -2}, the generator g = 3 and all encodings
// of zero are this design's choices.
package mrrns_pkg;

  localparam int unsigned GEN      = 3;     // primitive root of 17 and of 257
  localparam int unsigned D_MAX    = 5;     // replication factor d
  localparam int unsigned DATA_W   = 10;    // sample / coefficient bits
  localparam int unsigned X_BITS   = 3;     // indeterminate X = 2^3 = 8
  localparam int unsigned N_IN     = 4;     // forward-map inputs: d0 d1 d2 sign
  localparam int unsigned M_RNS    = 17 * 257;          // 4369
  localparam int signed   HALF_RNS = (M_RNS - 1) / 2;   // 2184

  // Evaluation point j of the polynomial map (j = 0..4) as a signed integer.
  function automatic int signed root(input int j);
    case (j)
      0: return 0;
      1: return 1;
      2: return -1;
      3: return 2;
      default: return -2;
    endcase
  endfunction

  function automatic int unsigned mod_p(input longint signed v, input int unsigned p);
    longint signed r;
    r = v % longint'(p);
    if (r < 0) r += longint'(p);
    return int'(r);
  endfunction

  function automatic int unsigned mod_pow(input int unsigned b, input int unsigned e,
                                          input int unsigned p);
    longint unsigned r, x;
    r = 1; x = 64'(b % p);
    for (int unsigned k = e; k > 0; k >>= 1) begin
      if (k[0]) r = (r * x) % 64'(p);
      x = (x * x) % 64'(p);
    end
    return int'(r);
  endfunction

  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned p);
    return mod_pow(a, p - 2, p);
  endfunction

  // Discrete log base GEN of a nonzero residue v.
  function automatic int unsigned dlog(input int unsigned v, input int unsigned p);
    int unsigned x;
    x = 1;
    for (int unsigned k = 0; k < p - 1; k++) begin
      if (x == v % p) return k;
      x = (x * GEN) % p;
    end
    return 0;
  endfunction

  // Index form {NAN, k} of a normal-form residue, NB index bits.
  function automatic int unsigned to_index(input int unsigned v, input int unsigned p,
                                           input int unsigned nb);
    if (v % p == 0) return 1 << nb;
    return dlog(v, p);
  endfunction

  // Forward (Vandermonde) weight from input i (0: d0, 1: d1, 2: d2, 3: sign)
  // to evaluation point j, normal form.
  function automatic int unsigned fwd_weight(input int i, input int j, input int unsigned p);
    longint signed r;
    r = longint'(root(j));
    case (i)
      0: return mod_p(1, p);
      1: return mod_p(r, p);
      2: return mod_p(r * r, p);
      default: return mod_p(-8 * r * r, p);
    endcase
  endfunction

  // Inverse Vandermonde weight: contribution of evaluation point i to the
  // polynomial coefficient k (Lagrange basis polynomial L_i, coefficient X^k).
  function automatic int unsigned inv_weight(input int i, input int k, input int unsigned p);
    int unsigned poly [D_MAX+1];
    int unsigned nxt  [D_MAX+1];
    int unsigned den;
    for (int t = 0; t <= D_MAX; t++) poly[t] = 0;
    poly[0] = 1;
    den = 1;
    for (int m = 0; m < D_MAX; m++) begin
      if (m != i) begin
        // poly *= (X - r_m)
        for (int t = 0; t <= D_MAX; t++) begin
          nxt[t] = mod_p((t > 0 ? longint'(poly[t-1]) : 64'sd0)
                         - longint'(root(m)) * longint'(poly[t]), p);
        end
        poly = nxt;
        den = mod_p(longint'(den) * (longint'(root(i)) - longint'(root(m))), p);
      end
    end
    return mod_p(longint'(poly[k]) * longint'(mod_inv(den, p)), p);
  endfunction

  // Value of a 10-bit signed coefficient's digit polynomial at point j,
  // normal form (used to load the coefficient indices of the subpaths).
  function automatic int unsigned coef_value(input logic signed [DATA_W-1:0] h, input int j,
                                             input int unsigned p);
    longint signed acc;
    logic [DATA_W-1:0] u;
    u   = h;
    acc = 0;
    for (int i = 0; i < N_IN; i++) begin
      longint signed dig;
      if (i < 3) dig = longint'(u[X_BITS*i +: X_BITS]);
      else       dig = longint'(u[DATA_W-1]);
      acc += dig * longint'(fwd_weight(i, j, p));
    end
    return mod_p(acc, p);
  endfunction

  // Coefficient index {NAN, k} for subpath j of ring p.
  function automatic int unsigned coef_index(input logic signed [DATA_W-1:0] h, input int j,
                                             input int unsigned p, input int unsigned nb);
    return to_index(coef_value(h, j, p), p, nb);
  endfunction

  // Pipeline latencies (clock cycles) of the blocks.
  localparam int unsigned LAT_MAC     = 3;   // alpha/beta -> c_out
  localparam int unsigned LAT_IDX     = 1;   // dim1_to_index
  localparam int unsigned LAT_NORM    = 1;   // dim1_normalize
  localparam int unsigned LAT_MRC     = 4;   // mrc_converter
  localparam int unsigned LAT_FINAL   = 2;   // final_adder

  function automatic int unsigned lat_array(input int unsigned rows, input int unsigned cols);
    return rows + cols + 1;
  endfunction

  // Sample in -> diminished-one result of a subpath of n taps, for the
  // newest sample's product with tap 0.
  function automatic int unsigned lat_subpath(input int unsigned n);
    return LAT_IDX + n + 3 + LAT_NORM;
  endfunction

  function automatic int unsigned lat_encoder();
    return LAT_IDX + lat_array(N_IN, D_MAX) + LAT_NORM;
  endfunction

  function automatic int unsigned lat_inverse();
    return LAT_IDX + lat_array(D_MAX, D_MAX) + LAT_NORM;
  endfunction

  function automatic int unsigned lat_ring_path(input int unsigned n);
    return lat_encoder() + lat_subpath(n) + lat_inverse();
  endfunction

  function automatic int unsigned lat_fir(input int unsigned n);
    return 1 + lat_ring_path(n) + LAT_MRC + LAT_FINAL;
  endfunction

endpackage
