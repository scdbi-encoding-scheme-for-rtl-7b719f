// ni_rx: ejection side of a network interface with an SCDBI decoder.
//
// Takes flits from the link (valid/ready, head flag, data lines and the
// invert line). Header flits are passed on as received; body flits are
// restored by scdbi_decoder (complemented when the invert line is high).
//
// Timing: one register stage towards the local core. A flit accepted from
// the link on a clock edge is on out_* from that edge on; link_ready is high
// while the output register is empty or being emptied, so one flit per
// cycle passes. The register stage and the handshake are this design's
// choice; the header bypass and the decoding follow the scheme.
module ni_rx #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // link side
  input  logic         link_valid,
  output logic         link_ready,
  input  logic         link_head,
  input  logic         link_inv,
  input  logic [W-1:0] link_data,
  // core side
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_head,
  output logic [W-1:0] out_data
);

  logic         accept;
  logic [W-1:0] dec_x;

  assign link_ready = !out_valid || out_ready;
  assign accept     = link_valid && link_ready;

  scdbi_decoder #(.W(W)) u_dec (
    .z  (link_data),
    .inv(link_inv),
    .x  (dec_x)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_data  <= '0;
    end else if (accept) begin
      out_valid <= 1'b1;
      out_head  <= link_head;
      out_data  <= link_head ? link_data : dec_x;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // A flit offered to the core stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable({out_head, out_data}));

endmodule
