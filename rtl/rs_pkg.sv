// rs_pkg: sizes, the field-element type and the two linear field steps shared by
// the universal Reed-Solomon decoder.
//
// The decoder works in GF(2^m) for any m <= GF_D, with the field chosen at run
// time by its primitive polynomial p(x). A polynomial p(x) is carried as a
// GF_D+1 bit vector that includes the leading x^m term. Inside the decoder every
// field element is held in Montgomery form X' = X * x^m mod p(x), so that the
// Montgomery multiplier (uffm) multiplies two such values directly.
//
// xtime() multiplies by x (the "universal alpha generator" step), xdiv() by x^-1
// (the "universal alpha^-1 generator" step). Both are linear, so they apply to
// plain and Montgomery forms alike.
package rs_pkg;

  localparam int GF_D   = 8;    // largest field degree supported (m <= 8)
  localparam int N_MAX  = 255;  // longest codeword
  localparam int NK_MAX = 32;   // most parity symbols n-k (2t, t <= 16)
  localparam int T_MAX  = 16;   // highest errata locator degree / erasures held
  localparam int NSC    = 16;   // syndrome cells, syndromes computed per pass

  typedef logic [GF_D-1:0] gf_t;
  typedef logic [GF_D:0]   poly_t;   // p(x) including the x^m term

  // Field definition as loaded by RS_DEF.
  typedef struct packed {
    logic [3:0] m;      // field degree, 2..8
    poly_t      p;      // primitive polynomial with the leading x^m bit
    logic [7:0] n;      // codeword length, <= 2^m - 1
    logic [5:0] nk;     // parity symbols n-k, 1..32
  } rs_cfg_t;

  // v * x mod p(x); v is an element of GF(2^m)
  function automatic gf_t xtime(gf_t v, poly_t p, logic [3:0] m);
    poly_t t;
    t = {v, 1'b0};
    if (t[m]) t = t ^ p;
    return t[GF_D-1:0];
  endfunction

  // v * x^-1 mod p(x); p(0) = 1 for a primitive polynomial
  function automatic gf_t xdiv(gf_t v, poly_t p);
    poly_t t;
    t = {1'b0, v};
    if (t[0]) t = t ^ p;
    return t[GF_D:1];
  endfunction

endpackage
