// ni_tx: injection side of a network interface with an SCDBI encoder.
//
// Flits from the local core arrive on a valid/ready stream together with a
// head flag. A header flit (routing information the routers must read) is
// put on the link unchanged with the invert line low. A body flit is
// encoded by scdbi_encoder: it goes out as is or complemented, whichever
// charges less self and coupling capacitance relative to the previous
// encoded body flit, and the invert line tells the far end which.
//
// Timing: one register stage. A flit accepted on a clock edge (in_valid &&
// in_ready) is on the link from that edge on; in_ready is high while the
// link register is empty or being emptied (link_ready), so the interface
// carries one flit per cycle. When no new flit follows, the data and invert
// lines keep their last value, so an idle link does not toggle. Flow
// control and the register stage are this design's choice; the header
// bypass and the encoding follow the scheme.
module ni_tx #(
  parameter int unsigned W = scdbi_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // core side
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_head,
  input  logic [W-1:0] in_data,
  // link side
  output logic         link_valid,
  input  logic         link_ready,
  output logic         link_head,
  output logic         link_inv,
  output logic [W-1:0] link_data
);

  logic         accept;
  logic [W-1:0] enc_z;
  logic         enc_inv;

  assign in_ready = !link_valid || link_ready;
  assign accept   = in_valid && in_ready;

  scdbi_encoder #(.W(W)) u_enc (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (in_data),
    .take (accept && !in_head),
    .z    (enc_z),
    .inv  (enc_inv)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_head  <= 1'b0;
      link_inv   <= 1'b0;
      link_data  <= '0;
    end else if (accept) begin
      link_valid <= 1'b1;
      link_head  <= in_head;
      link_inv   <= in_head ? 1'b0 : enc_inv;
      link_data  <= in_head ? in_data : enc_z;
    end else if (link_ready) begin
      link_valid <= 1'b0;
    end
  end

  // A flit offered on the link stays unchanged until it is taken.
  a_link_stable: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable({link_head, link_inv, link_data}));

endmodule
