// adder_pkg: types and helpers shared by the adder family.
//
// adder_kind_e names the six parallel adder architectures that can serve as a
// sub-adder of the hybrid adder: ripple carry, carry lookahead, modified carry
// skip, carry select, Sklansky prefix and Brent-Kung prefix.
//
// gp_t is a (generate, propagate) pair. gp_combine is the associative prefix
// operator used by the carry lookahead and parallel prefix adders:
//   (g, p) = (g_hi, p_hi) o (g_lo, p_lo) = (g_hi | p_hi & g_lo, p_hi & p_lo)
// where "hi" is the more significant span. Purely combinational, no timing.
package adder_pkg;

  typedef enum logic [2:0] {
    ADD_RCA  = 3'd0,
    ADD_CLA  = 3'd1,
    ADD_CSKA = 3'd2,
    ADD_CSLA = 3'd3,
    ADD_SK   = 3'd4,
    ADD_BK   = 3'd5
  } adder_kind_e;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Number of levels of a binary prefix tree over n bits: ceil(log2(n)).
  function automatic int unsigned clog2_min1(int unsigned n);
    int unsigned l;
    l = 0;
    while ((1 << l) < n) l++;
    return (l == 0) ? 1 : l;
  endfunction

endpackage
