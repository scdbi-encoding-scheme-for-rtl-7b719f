// scdbi_noc_top: end-to-end SCDBI link between two network interfaces.
//
// A packet is a header flit followed by body flits. The source network
// interface (ni_tx) sends the header as is and encodes every body flit with
// SCDBI, adding one invert line to the link; the destination interface
// (ni_rx) decodes the body flits, so the cores at both ends see the
// original data and routers in between would need no change. Here the two
// interfaces are joined by one link, whose lines are brought out as
// link_* for observation; routers are not part of this design.
//
// Body payload comes either from the core port in_data (src_lfsr = 0) or,
// for measuring link activity on pseudo-random data, from an LFSR that
// advances once per accepted body flit (src_lfsr = 1). Headers always come
// from in_data. The LFSR source switch is this design's own addition.
//
// Timing: a flit accepted on in_* appears on link_* one cycle later and on
// out_* one cycle after that (two cycles end to end), one flit per cycle;
// out_ready back-pressure stalls the path flit by flit.
module scdbi_noc_top #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         src_lfsr,
  // source core
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_head,
  input  logic [W-1:0] in_data,
  // the link between the two interfaces
  output logic         link_valid,
  output logic         link_head,
  output logic         link_inv,
  output logic [W-1:0] link_data,
  // destination core
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_head,
  output logic [W-1:0] out_data
);

  logic [W-1:0] lfsr_value;
  logic [W-1:0] tx_data;
  logic         link_ready;
  logic         use_lfsr;

  assign use_lfsr = src_lfsr && !in_head;
  assign tx_data  = use_lfsr ? lfsr_value : in_data;

  lfsr_gen #(.W(W)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (in_valid && in_ready && use_lfsr),
    .value(lfsr_value)
  );

  ni_tx #(.W(W)) u_ni_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_head   (in_head),
    .in_data   (tx_data),
    .link_valid(link_valid),
    .link_ready(link_ready),
    .link_head (link_head),
    .link_inv  (link_inv),
    .link_data (link_data)
  );

  ni_rx #(.W(W)) u_ni_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .link_valid(link_valid),
    .link_ready(link_ready),
    .link_head (link_head),
    .link_inv  (link_inv),
    .link_data (link_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_head  (out_head),
    .out_data  (out_data)
  );

endmodule
