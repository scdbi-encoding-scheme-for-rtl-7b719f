// lfsr_gen: linear feedback shift register used as a pseudo-random source
// of body-flit payload, the traffic on which link power is compared with
// and without SCDBI.
//
// Galois form, shifting right: when step is high the state moves one place
// to the right and, if the bit shifted out was 1, is XORed with POLY. The
// default POLY 32'h8020_0003 is the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1, so the 32-bit state runs through all
// 2^32 - 1 non-zero values. Width, polynomial and seed are this design's
// choice. Synchronous active-low reset loads SEED (must be non-zero).
// value is the current state; it changes on the clock edge after step.
module lfsr_gen #(
  parameter int unsigned W    = scdbi_pkg::FLIT_W,
  parameter logic [W-1:0] POLY = W'(32'h8020_0003),
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] value
);

  always_ff @(posedge clk) begin
    if (!rst_n)    value <= SEED;
    else if (step) value <= (value >> 1) ^ (value[0] ? POLY : '0);
  end

  // A Galois LFSR must never reach the all-zero lock-up state.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) value != '0);

endmodule
