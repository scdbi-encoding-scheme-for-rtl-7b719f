// ones_counter: population count of an N-bit flag vector.
//
// The SCDBI encoder counts its per-line and per-pair transition flags with
// ones counters before comparing the weighted sums. Only the counter's
// function is fixed by the scheme; here it is a combinational sum of the
// bits, which synthesis turns into an adder tree. The count is
// $clog2(N+1) bits wide, enough for all N bits set.
module ones_counter #(
  parameter int unsigned N = scdbi_pkg::FLIT_W,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) begin
      count = count + CW'(bits[i]);
    end
  end

endmodule
