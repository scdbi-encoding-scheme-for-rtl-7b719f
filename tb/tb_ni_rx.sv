// tb_ni_rx: drives the ejection interface with link flits (headers with
// the invert line low, body flits sent plain or complemented at random)
// under random core back-pressure, and checks that the core receives the
// original flits in order, one cycle after the link hands them over, held
// steady while stalled.
module tb_ni_rx;
  localparam int unsigned W = 32;

  logic clk = 0, rst_n = 0;
  logic link_valid = 0, link_ready, link_head = 0, link_inv = 0;
  logic [W-1:0] link_data = '0;
  logic out_valid, out_ready = 0, out_head;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0, n_head = 0, n_inv = 0, n_plain = 0, n_stall = 0;

  ni_rx #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic head; logic [W-1:0] data; } flit_t;
  flit_t q[$];
  localparam int TOTAL = 2000;
  int sent = 0, got = 0;
  logic acc_prev = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < TOTAL) begin
      @(negedge clk);
      if (!link_valid || acc_prev) begin
        flit_t f;
        link_valid = ($urandom_range(4) != 0);
        f.head = ($urandom_range(3) == 0);
        f.data = $urandom();
        link_head = f.head;
        link_inv  = f.head ? 1'b0 : 1'($urandom());
        link_data = link_inv ? ~f.data : f.data;
        if (link_valid) q.push_back(f);
        if (link_valid) sent++;
      end
    end
    @(negedge clk);
    if (acc_prev) link_valid = 0;
  end

  always @(posedge clk) acc_prev <= rst_n && link_valid && link_ready;
  always @(negedge clk) begin
    out_ready = ($urandom_range(3) != 0);
    if (got + 1 >= TOTAL) out_ready = 1;
  end

  logic held = 0; logic [W-1:0] held_data;
  always @(posedge clk) if (rst_n) begin
    if (acc_prev) begin
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
    end
    if (held) begin
      checks++;
      if (!out_valid || out_data !== held_data) begin failures++; $display("FAIL changed under stall"); end
    end
    held <= out_valid && !out_ready;
    held_data <= out_data;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      flit_t f;
      f = q.pop_front();
      got++;
      checks++;
      if (out_head !== f.head || out_data !== f.data) begin
        failures++; $display("FAIL got %b %h expected %b %h", out_head, out_data, f.head, f.data);
      end
      if (f.head) n_head++;
    end
    if (link_valid && link_ready && !link_head) begin
      if (link_inv) n_inv++; else n_plain++;
    end
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
