// tb_scdbi_lfsr_power: link switching activity on LFSR traffic, the
// workload on which SCDBI's power saving is measured. One header flit is
// followed by a long run of body flits whose payload comes from the
// design's LFSR. For every body flit on the link the testbench counts, by
// the link power model, the 0->1 transitions and the Type I and Type II
// coupling transitions of the 32 data lines, both as sent (SCDBI) and as
// they would have been without encoding, plus the extra cost of the invert
// line when placed next to the top data line. It checks that the decoded
// output equals the LFSR sequence, that no single flit is sent in the
// costlier of its two forms, and that the encoded link switches less
// capacitance than the raw one, and prints the saving.
module tb_scdbi_lfsr_power;
  import scdbi_ref_pkg::*;
  localparam int unsigned W = scdbi_pkg::FLIT_W;
  localparam int FLITS = 50000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_head = 0;
  logic [W-1:0] in_data = '0;
  logic link_valid, link_head, link_inv;
  logic [W-1:0] link_data;
  logic out_valid, out_head;
  logic [W-1:0] out_data;
  logic out_ready = 1, src_lfsr = 1;

  scdbi_noc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, body = 0, n_inv = 0;
  longint self_raw = 0, self_enc = 0, coup_raw = 0, coup_enc = 0, inv_line = 0;
  logic [W-1:0] raw_prev = '0, enc_prev = '0, lfsr_model = W'(1);
  logic inv_prev = 0;

  function automatic logic [W-1:0] lfsr_next(logic [W-1:0] v);
    logic [W-1:0] n;
    n = v >> 1;
    if (v[0]) n ^= 32'h8020_0003;
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    in_valid = 1; in_head = 1; in_data = 32'hA5A5_0001;
    @(negedge clk);
    in_head = 0;
  end

  always @(posedge clk) if (rst_n && link_valid && !link_head) begin
    logic [W-1:0] plain;
    plain = link_inv ? ~link_data : link_data;
    checks++;
    if (plain !== lfsr_model) begin failures++; $display("FAIL payload %h expected %h", plain, lfsr_model); end
    checks++;
    if (link_cost(vec_t'(enc_prev), vec_t'(link_data), W) > link_cost(vec_t'(enc_prev), vec_t'(~link_data), W)) begin
      failures++; $display("FAIL costlier form sent");
    end
    self_raw += self_count(vec_t'(raw_prev), vec_t'(plain), W);
    coup_raw += type_count(vec_t'(raw_prev), vec_t'(plain), W, 1) + 2 * type_count(vec_t'(raw_prev), vec_t'(plain), W, 2);
    self_enc += self_count(vec_t'(enc_prev), vec_t'(link_data), W);
    coup_enc += type_count(vec_t'(enc_prev), vec_t'(link_data), W, 1) + 2 * type_count(vec_t'(enc_prev), vec_t'(link_data), W, 2);
    inv_line += link_cost({62'b0, inv_prev, enc_prev[W-1]}, {62'b0, link_inv, link_data[W-1]}, 2)
              - link_cost({63'b0, enc_prev[W-1]}, {63'b0, link_data[W-1]}, 1);
    raw_prev = plain; enc_prev = link_data; inv_prev = link_inv;
    lfsr_model = lfsr_next(lfsr_model);
    if (link_inv) n_inv++;
    body++;
    if (body == FLITS) begin
      longint raw, enc;
      raw = self_raw + 4 * coup_raw;
      enc = self_enc + 4 * coup_enc + inv_line;
      checks++;
      if (enc >= raw) begin failures++; $display("FAIL no saving"); end
      checks++;
      if (out_valid !== 1'b1 || out_head !== 1'b0) begin failures++; $display("FAIL output stream"); end
      $display("body flits=%0d inverted=%0d", body, n_inv);
      $display("0->1 transitions raw=%0d scdbi=%0d", self_raw, self_enc);
      $display("weighted coupling (T1+2*T2) raw=%0d scdbi=%0d", coup_raw, coup_enc);
      $display("cost c_s units raw=%0d scdbi=%0d (invert line %0d) saving=%0d.%02d%%",
               raw, enc, inv_line, (raw - enc) * 100 / raw, ((raw - enc) * 10000 / raw) % 100);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
