// scdbi_pkg: constants shared by the SCDBI (self and coupling driven bus
// invert) encoder, decoder and network-interface modules.
//
// The link power model weighs a 0->1 transition of a line by its self
// capacitance c_s and a coupling transition between two adjacent lines by
// the coupling capacitance c_c: Type I counts once (k1 = 1), Type II twice
// (k2 = 2), Types III and IV not at all. With c_c/c_s = 4 the invert rule
// compares T01 + 8*T2 against T00 + 8*T4**. The ratio and the weights are
// taken from the scheme's derivation; the flit width of 32 bits is this
// design's own choice, as no width is fixed by the scheme.
package scdbi_pkg;

  // Default number of data lines of a flit (link width without the invert line).
  parameter int unsigned FLIT_W = 32;

  // Ratio of coupling to self capacitance used by the invert rule.
  parameter int unsigned CC_OVER_CS = 4;

  // Weight of a Type II coupling transition relative to a Type I one.
  parameter int unsigned K2 = 2;

  // Weight of the coupling counts in the invert rule: k2 * c_c / c_s.
  parameter int unsigned INV_WEIGHT = K2 * CC_OVER_CS;

endpackage
