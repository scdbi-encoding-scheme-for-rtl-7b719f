// tb_scdbi_noc_top: end-to-end test of the SCDBI link at its default
// 32-bit width. Packets of one header and 1..8 body flits are sent from the
// source core port to the destination core port, their body payload taken
// from in_data or, in stretches, from the built-in LFSR. Random gaps at the
// source and random back-pressure at the destination stall the path.
//
// Checked: every flit arrives unchanged and in order; headers cross the
// link unencoded with the invert line low; every body flit on the link is
// encoded exactly as the reference cost model chooses against the previous
// encoded body flit; the end-to-end latency is never below two cycles and
// is exactly two when nothing stalls. Counted, and each required at least
// once: header bypass, inverted body flit, plain body flit, source stall
// (in_valid while not ready), destination stall, LFSR payload, core
// payload. Also reports the link's switched-capacitance cost with and
// without encoding on the data lines.
module tb_scdbi_noc_top;
  import scdbi_ref_pkg::*;
  localparam int unsigned W = scdbi_pkg::FLIT_W;

  logic clk = 0, rst_n = 0;
  logic src_lfsr = 0;
  logic in_valid = 0, in_ready, in_head = 0;
  logic [W-1:0] in_data = '0;
  logic link_valid, link_head, link_inv;
  logic [W-1:0] link_data;
  logic out_valid, out_ready = 0, out_head;
  logic [W-1:0] out_data;

  scdbi_noc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_head = 0, n_inv = 0, n_plain = 0, n_in_stall = 0, n_out_stall = 0;
  int n_lfsr = 0, n_core = 0, n_lat2 = 0;
  longint cost_enc = 0, cost_raw = 0;
  localparam int TOTAL = 20000;

  typedef struct { logic head; logic [W-1:0] data; longint t; } flit_t;
  flit_t q[$];        // flits in flight, original payload
  flit_t lq[$];       // expected link values
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Independent model of the payload LFSR: x^32 + x^22 + x^2 + x + 1,
  // Galois form shifting right, seed 1.
  logic [W-1:0] lfsr_model = W'(1);
  logic [W-1:0] y_model = '0;       // last encoded body flit
  logic [W-1:0] raw_prev = '0;      // data lines of an unencoded link
  logic [W-1:0] enc_prev = '0;      // data lines of this link
  int sent = 0, got = 0;
  logic acc_prev = 0;

  function automatic logic [W-1:0] lfsr_next(logic [W-1:0] v);
    logic [W-1:0] n;
    n = v >> 1;
    if (v[0]) begin n[31] ^= 1'b1; n[21] ^= 1'b1; n[1] ^= 1'b1; n[0] ^= 1'b1; end
    return n;
  endfunction

  // Source.
  initial begin
    int body_left;
    body_left = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < TOTAL) begin
      @(negedge clk);
      if (!in_valid || acc_prev) begin
        // Switch the payload source now and then, between packets.
        if (body_left == 0 && $urandom_range(9) == 0) src_lfsr = ~src_lfsr;
        in_valid = ($urandom_range(5) != 0);
        if (body_left == 0) begin
          in_head = 1; in_data = $urandom(); body_left = $urandom_range(8, 1);
        end else begin
          in_head = 0;
          in_data = ($urandom_range(1) == 0) ? 32'($urandom()) : ~y_model ^ 32'($urandom_range(65535));
        end
        if (in_valid && !in_head) body_left--;
        if (!in_valid && in_head) body_left = 0;
      end
    end
    @(negedge clk);
    if (acc_prev) in_valid = 0;
  end

  // Record accepted flits.
  always @(posedge clk) begin
    acc_prev <= 0;
    if (rst_n && in_valid && in_ready) begin
      flit_t f, l;
      acc_prev <= 1;
      f.head = in_head;
      f.t    = cyc;
      if (!in_head && src_lfsr) begin
        f.data = lfsr_model;
        lfsr_model = lfsr_next(lfsr_model);
        n_lfsr++;
      end else begin
        f.data = in_data;
        if (!in_head) n_core++;
      end
      l = f;
      if (!in_head) begin
        l.data  = ref_inv(vec_t'(y_model), vec_t'(f.data), W) ? ~f.data : f.data;
        y_model = l.data;
      end
      q.push_back(f);
      lq.push_back(l);
      sent++;
    end
    if (rst_n && in_valid && !in_ready) n_in_stall++;
  end

  // Link observation: encoding and cost.
  always @(posedge clk) if (rst_n && link_valid && dut.link_ready) begin
    flit_t l;
    l = lq.pop_front();
    checks++;
    if (link_head !== l.head || link_data !== l.data) begin
      failures++; $display("FAIL link flit %h expected %h", link_data, l.data);
    end
    if (link_head) begin
      n_head++;
      checks++;
      if (link_inv !== 1'b0) begin failures++; $display("FAIL header invert line"); end
    end else if (link_inv) n_inv++;
    else n_plain++;
    // Cost of the data lines, with SCDBI and with the same payload sent raw.
    cost_enc += link_cost(vec_t'(enc_prev), vec_t'(link_data), W);
    enc_prev  = link_data;
  end

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    logic [W-1:0] d;
    d = (!in_head && src_lfsr) ? lfsr_model_before : in_data;
    cost_raw += link_cost(vec_t'(raw_prev), vec_t'(d), W);
    raw_prev  = d;
  end
  logic [W-1:0] lfsr_model_before;
  always @(negedge clk) lfsr_model_before = lfsr_model;

  // Sink.
  always @(negedge clk) out_ready = ($urandom_range(4) != 0) || (sent >= TOTAL);
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      flit_t f;
      longint lat;
      f = q.pop_front();
      got++;
      lat = cyc - f.t;
      checks++;
      if (out_head !== f.head || out_data !== f.data) begin
        failures++; $display("FAIL out %b %h expected %b %h", out_head, out_data, f.head, f.data);
      end
      checks++;
      if (lat < 2) begin failures++; $display("FAIL latency %0d", lat); end
      if (lat == 2) n_lat2++;
    end
  end

  initial begin
    wait (got == TOTAL);
    @(posedge clk);
    checks++;
    if (n_head == 0 || n_inv == 0 || n_plain == 0 || n_in_stall == 0 || n_out_stall == 0
        || n_lfsr == 0 || n_core == 0 || n_lat2 == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("header_bypass=%0d body_inverted=%0d body_plain=%0d source_stalls=%0d dest_stalls=%0d",
             n_head, n_inv, n_plain, n_in_stall, n_out_stall);
    $display("lfsr_payload=%0d core_payload=%0d two_cycle_latency=%0d", n_lfsr, n_core, n_lat2);
    $display("data-line cost raw=%0d encoded=%0d", cost_raw, cost_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
