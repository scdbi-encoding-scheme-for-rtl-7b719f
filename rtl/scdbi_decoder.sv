// scdbi_decoder: SCDBI decoder at the destination network interface.
//
// The encoder sends either the body flit or its complement and says which
// on the extra invert line, so decoding needs no state: x = inv ? ~z : z.
// Combinational, no latency of its own.
module scdbi_decoder #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic [W-1:0] z,
  input  logic         inv,
  output logic [W-1:0] x
);

  assign x = z ^ {W{inv}};

endmodule
