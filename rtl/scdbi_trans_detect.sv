// scdbi_trans_detect: first level of the SCDBI encoder.
//
// Compares the incoming body flit x with the previously encoded body flit y
// (the value the link lines last carried for a body flit) and flags, line
// by line and pair by pair, the transitions the invert rule needs:
//   t01[i]  y_i -> x_i is a 0->1 transition (charges c_s if sent as is)
//   t00[i]  y_i -> x_i stays at 0 (becomes a 0->1 transition if inverted)
//   t2[i]   y_i y_i+1 -> x_i x_i+1 is a Type II transition (01->10, 10->01):
//           the two lines switch in opposite directions, costing 2*c_c
//   t4ss[i] the pair holds an unequal value (01->01, 10->10), a Type IV
//           transition that turns into Type II if x is inverted (T4**)
// Pairs are the W-1 adjacent data lines; the invert line is not paired.
// The classification follows the scheme's transition table; the bit
// ordering of the pairs is this design's choice. Purely combinational.
module scdbi_trans_detect #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] t01,
  output logic [W-1:0] t00,
  output logic [W-2:0] t2,
  output logic [W-2:0] t4ss
);

  always_comb begin
    t01 = ~y & x;
    t00 = ~y & ~x;
    for (int unsigned i = 0; i < W - 1; i++) begin
      // Type II: both lines toggle and they were different before.
      t2[i]   = (y[i] ^ x[i]) & (y[i+1] ^ x[i+1]) & (y[i] ^ y[i+1]);
      // T4**: neither line toggles and they differ from each other.
      t4ss[i] = ~(y[i] ^ x[i]) & ~(y[i+1] ^ x[i+1]) & (y[i] ^ y[i+1]);
    end
  end

endmodule
