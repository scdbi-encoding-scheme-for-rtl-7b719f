// scdbi_inv_cmp: the SCDBI invert decision.
//
// Given the counts of 0->1 lines (n01), 0->0 lines (n00), Type II pairs
// (n2) and T4** pairs (n4ss), asserts inv when
//     n01 + WEIGHT*n2 > n00 + WEIGHT*n4ss
// i.e. when sending the flit inverted would charge less self plus coupling
// capacitance than sending it as is. WEIGHT = 8 follows from k2 = 2 and
// c_c/c_s = 4. Ties keep the flit as is (the rule is a strict inequality).
// Type I transitions are the same either way and drop out. Combinational.
module scdbi_inv_cmp #(
  parameter int unsigned W      = scdbi_pkg::FLIT_W,
  parameter int unsigned WEIGHT = scdbi_pkg::INV_WEIGHT,
  localparam int unsigned LW = $clog2(W + 1),   // line count width
  localparam int unsigned PW = $clog2(W),       // pair count width (W-1 pairs)
  localparam int unsigned SW = $clog2(W + WEIGHT * (W - 1) + 1)
) (
  input  logic [LW-1:0] n01,
  input  logic [LW-1:0] n00,
  input  logic [PW-1:0] n2,
  input  logic [PW-1:0] n4ss,
  output logic          inv
);

  logic [SW-1:0] cost_plain;   // cost terms that differ, flit sent as is
  logic [SW-1:0] cost_inv;     // the same terms, flit sent inverted

  always_comb begin
    cost_plain = SW'(n01) + SW'(WEIGHT) * SW'(n2);
    cost_inv   = SW'(n00) + SW'(WEIGHT) * SW'(n4ss);
    inv        = cost_plain > cost_inv;
  end

endmodule
