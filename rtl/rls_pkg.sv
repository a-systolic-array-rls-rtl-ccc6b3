// rls_pkg: word format, complex sample type, row tags and fixed-point
// arithmetic shared by every cell of the systolic RLS array.
//
// All arithmetic is 32-bit two's-complement fixed point (the 32-bit word is
// the processor's own figure). The split between integer and fraction bits is
// this design's choice: FRAC_W = 20 fraction bits, so a word spans about
// +/-2048 with a resolution of about 1e-6. Products are rounded towards minus
// infinity (arithmetic shift) and every result saturates to the word range,
// so an overflow clips instead of wrapping.
//
// A row of data moving through the array carries a tag: `valid` marks a real
// sample, `freeze` marks a weight-flushing row (stored values are not
// updated), `first` marks the first row of a new estimation, on which every
// cell starts from zero stored state instead of its previous contents, and
// `last` marks the final flushing row of an estimation.
package rls_pkg;

  localparam int unsigned DATA_W = 32;  // fixed-point word
  localparam int unsigned FRAC_W = 20;  // fraction bits of a word

  typedef logic signed [DATA_W-1:0] fix_t;

  typedef struct packed {
    fix_t re;
    fix_t im;
  } cplx_t;

  typedef struct packed {
    logic valid;
    logic freeze;
    logic first;
    logic last;
  } tag_t;

  localparam fix_t FIX_ONE  = fix_t'(64'sd1 <<< FRAC_W);
  localparam fix_t FIX_MAX  = {1'b0, {(DATA_W-1){1'b1}}};
  localparam fix_t FIX_MIN  = {1'b1, {(DATA_W-1){1'b0}}};
  localparam cplx_t CPLX_ZERO = '0;
  localparam tag_t  TAG_NONE  = '0;

  // Clip a wide signed value to the word range.
  function automatic fix_t sat(input logic signed [2*DATA_W+1:0] v);
    if (v > $signed({{(DATA_W+2){1'b0}}, FIX_MAX})) return FIX_MAX;
    if (v < $signed({{(DATA_W+2){1'b1}}, FIX_MIN})) return FIX_MIN;
    return v[DATA_W-1:0];
  endfunction

  function automatic fix_t fadd(input fix_t a, input fix_t b);
    logic signed [2*DATA_W+1:0] s;
    s = (2*DATA_W+2)'(a) + (2*DATA_W+2)'(b);
    return sat(s);
  endfunction

  function automatic fix_t fsub(input fix_t a, input fix_t b);
    logic signed [2*DATA_W+1:0] s;
    s = (2*DATA_W+2)'(a) - (2*DATA_W+2)'(b);
    return sat(s);
  endfunction

  // Raw double-width product of two words (2*FRAC_W fraction bits).
  function automatic logic signed [2*DATA_W+1:0] wmul(input fix_t a, input fix_t b);
    return (2*DATA_W+2)'(a) * (2*DATA_W+2)'(b);
  endfunction

  function automatic fix_t fmul(input fix_t a, input fix_t b);
    return sat(wmul(a, b) >>> FRAC_W);
  endfunction

  // (a * b) / c, all three words: the double-width product divided by a word
  // gives a word again. c must be positive.
  function automatic fix_t fmuldiv(input fix_t a, input fix_t b, input fix_t c);
    logic signed [2*DATA_W+1:0] q;
    q = wmul(a, b) / (2*DATA_W+2)'(c);
    return sat(q);
  endfunction

  function automatic logic cplx_is_zero(input cplx_t a);
    return (a.re == '0) && (a.im == '0);
  endfunction

  // a * b
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = sat((wmul(a.re, b.re) - wmul(a.im, b.im)) >>> FRAC_W);
    r.im = sat((wmul(a.re, b.im) + wmul(a.im, b.re)) >>> FRAC_W);
    return r;
  endfunction

  // conj(a) * b
  function automatic cplx_t cmul_conj(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = sat((wmul(a.re, b.re) + wmul(a.im, b.im)) >>> FRAC_W);
    r.im = sat((wmul(a.re, b.im) - wmul(a.im, b.re)) >>> FRAC_W);
    return r;
  endfunction

  // real * complex
  function automatic cplx_t rmul(input fix_t a, input cplx_t b);
    cplx_t r;
    r.re = fmul(a, b.re);
    r.im = fmul(a, b.im);
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = fadd(a.re, b.re);
    r.im = fadd(a.im, b.im);
    return r;
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = fsub(a.re, b.re);
    r.im = fsub(a.im, b.im);
    return r;
  endfunction

  function automatic cplx_t cneg_conj(input cplx_t a);
    cplx_t r;
    r.re = fsub('0, a.re);
    r.im = a.im;
    return r;
  endfunction

  // |a|^2
  function automatic fix_t cabs2(input cplx_t a);
    return sat((wmul(a.re, a.re) + wmul(a.im, a.im)) >>> FRAC_W);
  endfunction

endpackage
