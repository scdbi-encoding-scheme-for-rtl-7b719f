// scdbi_ref_pkg: reference model of link switching cost for the SCDBI
// testbenches, written independently of the RTL.
//
// link_cost() follows the link power model directly: every line that goes
// 0->1 costs c_s (1 unit), and every pair of adjacent lines costs c_c
// (4 units) per Type I transition (exactly one line toggles) and 2*c_c per
// Type II transition (both toggle in opposite directions). Type III (both
// toggle the same way) and Type IV (neither toggles) cost nothing.
// ref_inv() picks inversion exactly when the inverted flit costs less.
// Vectors are carried in 64-bit containers with an explicit width w.
package scdbi_ref_pkg;

  localparam int unsigned MAXW = 64;
  localparam int unsigned CS   = 1;
  localparam int unsigned CC   = 4;

  typedef logic [MAXW-1:0] vec_t;

  // Coupling type of one pair of lines from (a0,b0) to (a1,b1): 1..4.
  function automatic int unsigned pair_type(logic a0, logic b0, logic a1, logic b1);
    logic ta, tb;
    ta = a0 != a1;
    tb = b0 != b1;
    if (ta && tb) return (a1 != b1) ? 2 : 3;   // opposite directions end unequal
    if (ta || tb) return 1;
    return 4;
  endfunction

  function automatic int unsigned self_count(vec_t prev, vec_t next, int unsigned w);
    int unsigned n = 0;
    for (int unsigned i = 0; i < w; i++) if (!prev[i] && next[i]) n++;
    return n;
  endfunction

  function automatic int unsigned type_count(vec_t prev, vec_t next, int unsigned w, int unsigned t);
    int unsigned n = 0;
    for (int unsigned i = 0; i + 1 < w; i++)
      if (pair_type(prev[i], prev[i+1], next[i], next[i+1]) == t) n++;
    return n;
  endfunction

  // Weighted switched capacitance for one transfer prev -> next on w lines.
  function automatic int unsigned link_cost(vec_t prev, vec_t next, int unsigned w);
    return CS * self_count(prev, next, w)
         + CC * (type_count(prev, next, w, 1) + 2 * type_count(prev, next, w, 2));
  endfunction

  function automatic vec_t invert(vec_t v, int unsigned w);
    vec_t m = '0;
    for (int unsigned i = 0; i < w; i++) m[i] = 1'b1;
    return v ^ m;
  endfunction

  function automatic logic ref_inv(vec_t y, vec_t x, int unsigned w);
    return link_cost(y, invert(x, w), w) < link_cost(y, x, w);
  endfunction

endpackage
