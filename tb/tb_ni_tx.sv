// tb_ni_tx: sends packets (one header flit, then 1..6 body flits) into the
// injection interface with random gaps and random link back-pressure, and
// checks every flit taken from the link: headers unchanged with the invert
// line low, body flits encoded against the previous encoded body flit
// exactly as the reference cost model chooses, flits held steady while
// stalled, and a one-cycle latency from acceptance to the link.
module tb_ni_tx;
  import scdbi_ref_pkg::*;
  localparam int unsigned W = 32;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_head = 0;
  logic [W-1:0] in_data = '0;
  logic link_valid, link_ready = 0, link_head, link_inv;
  logic [W-1:0] link_data;
  int checks = 0, failures = 0;
  int n_head = 0, n_inv = 0, n_plain = 0, n_stall = 0;

  ni_tx #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  // Expected link flits, in order, with the cycle they were accepted.
  typedef struct { logic head; logic [W-1:0] data; longint t; } flit_t;
  flit_t q[$];
  longint cyc = 0;
  logic [W-1:0] y_model = '0;
  int sent = 0, got = 0;
  localparam int TOTAL = 2000;

  always @(posedge clk) cyc <= cyc + 1;

  // Source: build packets, hold each flit until accepted.
  initial begin
    int body_left;
    body_left = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < TOTAL) begin
      @(negedge clk);
      if (!in_valid || (in_valid && acc_prev)) begin
        if ($urandom_range(4) == 0) begin
          in_valid = 0;
        end else begin
          in_valid = 1;
          if (body_left == 0) begin
            in_head = 1; in_data = $urandom(); body_left = $urandom_range(6, 1);
          end else begin
            in_head = 0; body_left--;
            case ($urandom_range(3))
              0: in_data = $urandom();
              1: in_data = ~y_model ^ 32'($urandom_range(255));
              default: in_data = $urandom() & 32'h0000_ffff;
            endcase
          end
        end
      end
    end
    @(negedge clk) in_valid = 0;
  end

  // Record each accepted flit with its expected link value.
  logic acc_prev = 0;
  always @(posedge clk) begin
    acc_prev <= 0;
    if (rst_n && in_valid && in_ready) begin
      flit_t f;
      acc_prev <= 1;
      f.head = in_head;
      f.t    = cyc;
      if (in_head) f.data = in_data;
      else begin
        f.data  = ref_inv(vec_t'(y_model), vec_t'(in_data), W) ? ~in_data : in_data;
        y_model = f.data;
      end
      q.push_back(f);
      sent++;
    end
  end

  // Sink: random ready, check every flit taken.
  logic [W-1:0] held_data; logic held_inv; logic held_valid = 0;
  always @(negedge clk) link_ready = ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (held_valid) begin
      checks++;
      if (!link_valid || link_data !== held_data || link_inv !== held_inv) begin
        failures++; $display("FAIL flit changed under stall");
      end
    end
    held_valid <= link_valid && !link_ready;
    held_data  <= link_data; held_inv <= link_inv;
    if (link_valid && !link_ready) n_stall++;
    if (link_valid && link_ready) begin
      flit_t f;
      logic [W-1:0] plain;
      f = q.pop_front();
      got++;
      checks++;
      if (link_head !== f.head) begin failures++; $display("FAIL head flag"); end
      if (f.head) begin
        n_head++;
        checks++;
        if (link_data !== f.data || link_inv !== 1'b0) begin failures++; $display("FAIL header altered"); end
      end else begin
        plain = link_inv ? ~link_data : link_data;
        checks++;
        if (link_data !== f.data || link_inv !== (f.data != plain ? 1'b1 : 1'b0)
            || (link_inv ? ~f.data : f.data) !== plain) begin
          failures++; $display("FAIL body data %h inv %b expected %h", link_data, link_inv, f.data);
        end
        if (link_inv) n_inv++; else n_plain++;
      end
    end
  end

  // Latency: a flit accepted at cycle t is valid on the link at t+1.
  always @(posedge clk) if (rst_n && acc_prev) begin
    checks++;
    if (!link_valid) begin failures++; $display("FAIL latency"); end
  end

  initial begin
    wait (got == TOTAL);
    @(posedge clk);
    checks++;
    if (n_head == 0 || n_inv == 0 || n_plain == 0 || n_stall == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("headers=%0d inverted=%0d plain=%0d stalls=%0d", n_head, n_inv, n_plain, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
