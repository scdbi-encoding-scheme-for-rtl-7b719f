// scdbi_encoder: self and coupling driven bus invert encoder.
//
// Keeps y, the last encoded body flit put on the link. For each body flit x
// it classifies every line and every adjacent line pair of y -> x
// (scdbi_trans_detect), counts the four kinds of flags (ones_counter) and
// asks scdbi_inv_cmp whether the inverted flit is cheaper. It outputs
// z = inv ? ~x : x together with the extra invert line inv.
//
// Interface and timing: z and inv are combinational from x and y. When the
// flit is actually sent, take is raised for one cycle and y is loaded with
// z on that clock edge. Only body flits are to be taken: headers travel
// unencoded and leave y alone, since the scheme defines y as the previously
// encoded body flit. Reset (rst_n low, synchronous) clears y to all zeros,
// this design's assumption for the idle link.
module scdbi_encoder #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  input  logic         take,
  output logic [W-1:0] z,
  output logic         inv
);

  localparam int unsigned LW = $clog2(W + 1);
  localparam int unsigned PW = $clog2(W);

  logic [W-1:0]  y;
  logic [W-1:0]  t01, t00;
  logic [W-2:0]  t2, t4ss;
  logic [LW-1:0] n01, n00;
  logic [PW-1:0] n2, n4ss;

  scdbi_trans_detect #(.W(W)) u_detect (
    .x(x), .y(y), .t01(t01), .t00(t00), .t2(t2), .t4ss(t4ss)
  );

  ones_counter #(.N(W))     u_cnt01 (.bits(t01),  .count(n01));
  ones_counter #(.N(W))     u_cnt00 (.bits(t00),  .count(n00));
  ones_counter #(.N(W - 1)) u_cnt2  (.bits(t2),   .count(n2));
  ones_counter #(.N(W - 1)) u_cnt4  (.bits(t4ss), .count(n4ss));

  scdbi_inv_cmp #(.W(W)) u_cmp (
    .n01(n01), .n00(n00), .n2(n2), .n4ss(n4ss), .inv(inv)
  );

  assign z = inv ? ~x : x;

  always_ff @(posedge clk) begin
    if (!rst_n)    y <= '0;
    else if (take) y <= z;
  end

endmodule
