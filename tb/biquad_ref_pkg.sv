// biquad_ref_pkg: integer reference model of the bit-true biquad, used by
// the testbenches. It works on plain 64-bit integers, independently of the
// RTL's operators:
//   rnd(c, v) = floor((c*v + 2**13) / 2**14)
//   w = clamp((x - rnd(a2,w1) - rnd(a3,w2)) * 2**shift)
//   y = clamp(rnd(b1,w) + rnd(b2,w1))
// with clamp to [-2**19, 2**19-1].
package biquad_ref_pkg;

  typedef struct {
    longint a2, a3, b1, b2;
  } ref_coefs_t;

  function automatic longint ref_rnd(longint c, longint v);
    longint p;
    p = c * v + 64'sd8192;
    // floor division by 2**14 (arithmetic shift)
    return p >>> 14;
  endfunction

  function automatic longint ref_clamp(longint v, output bit clipped);
    clipped = 1'b1;
    if (v > 64'sd524287)  return 64'sd524287;
    if (v < -64'sd524288) return -64'sd524288;
    clipped = 1'b0;
    return v;
  endfunction

  // one step of the recursion; returns y and updates the state (w1, w2)
  function automatic longint ref_step(longint x, ref_coefs_t c, int shift,
                                      inout longint w1, inout longint w2,
                                      output bit clipped);
    longint s, w, y;
    bit cw, cy;
    s  = ref_rnd(c.a2, w1) + ref_rnd(c.a3, w2);
    w  = ref_clamp((x - s) * (64'sd1 <<< shift), cw);
    y  = ref_clamp(ref_rnd(c.b1, w) + ref_rnd(c.b2, w1), cy);
    w2 = w1;
    w1 = w;
    clipped = cw | cy;
    return y;
  endfunction

  // the same step with the state passed by value
  typedef struct {
    longint w1, w2, y;
    bit     clipped;
  } ref_state_t;

  function automatic ref_state_t ref_next(longint x, ref_coefs_t c, int shift,
                                          ref_state_t st);
    ref_state_t r;
    longint a, b;
    bit cl;
    a = st.w1;
    b = st.w2;
    r.y = ref_step(x, c, shift, a, b, cl);
    r.w1 = a;
    r.w2 = b;
    r.clipped = cl;
    return r;
  endfunction

  // a random 20-bit sample; small amplitude most of the time
  function automatic longint rand_sample();
    int unsigned r;
    r = $urandom;
    case (r % 4)
      0:       return longint'($signed(20'($urandom)));
      1:       return longint'($signed(12'($urandom)));
      default: return longint'($signed(16'($urandom)));
    endcase
  endfunction

  // coefficients of a stable low-pass section (poles near z = 1),
  // scaled by 1/4 so that a(1) = 2**2 in the 14-fraction-bit format
  function automatic ref_coefs_t lowpass_coefs();
    ref_coefs_t c;
    c.a2 = -7043;   // -1.7196 / 4 * 2**14
    c.a3 =  3318;   //  0.81   / 4 * 2**14
    c.b1 =   205;   //  0.05   / 4 * 2**14
    c.b2 =   164;   //  0.04   / 4 * 2**14
    return c;
  endfunction

  function automatic ref_coefs_t rand_coefs();
    ref_coefs_t c;
    c.a2 = longint'($signed(14'($urandom)));
    c.a3 = longint'($signed(14'($urandom)));
    c.b1 = longint'($signed(14'($urandom)));
    c.b2 = longint'($signed(14'($urandom)));
    return c;
  endfunction

endpackage
