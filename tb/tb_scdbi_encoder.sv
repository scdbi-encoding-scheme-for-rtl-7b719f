// tb_scdbi_encoder: drives a 32-bit encoder with random body flits and
// checks, every cycle, that inv is set exactly when the inverted flit has a
// lower link cost than the plain one relative to the last taken flit
// (scdbi_ref_pkg), that z is x or ~x accordingly, and that the state only
// moves on take. Also runs the worked transfers of the transition table.
module tb_scdbi_encoder;
  import scdbi_ref_pkg::*;
  localparam int unsigned W = 32;

  logic clk = 0, rst_n = 0, take = 0;
  logic [W-1:0] x = '0, z, y_model;
  logic inv;
  int checks = 0, failures = 0, n_inv = 0, n_plain = 0;

  scdbi_encoder #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .x(x), .take(take), .z(z), .inv(inv));

  always #5 clk = ~clk;

  task automatic check_now();
    logic e_inv;
    e_inv = ref_inv(vec_t'(y_model), vec_t'(x), W);
    checks++;
    if (inv !== e_inv || z !== (e_inv ? ~x : x)) begin
      failures++;
      $display("FAIL y=%h x=%h inv=%b (exp %b) z=%h", y_model, x, inv, e_inv, z);
    end
    if (e_inv) n_inv++; else n_plain++;
  endtask

  initial begin
    y_model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // From all-zero lines, all ones would be 32 rising lines: send inverted.
    x = '1; #1 check_now();
    checks++; if (inv !== 1'b1) failures++;
    // From all-zero lines, 0x00000001 costs 1 + 4 = 5 as is, far less
    // than inverted: keep.
    x = 32'h1; #1 check_now();
    checks++; if (inv !== 1'b0) failures++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x = $urandom();
      if (n % 7 == 3) x = ~y_model ^ 32'(1 << (n % 32));   // near-complement flits
      if (n % 11 == 5) x = y_model;                          // repeated flit
      take = 1'($urandom_range(3) != 0);
      #1 check_now();
      @(posedge clk);
      if (take) y_model = z_at_edge;
    end
    checks++;
    if (n_inv == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL one decision never seen inv=%0d plain=%0d", n_inv, n_plain);
    end
    $display("inverted=%0d plain=%0d", n_inv, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The model's y follows the expected z, recorded when the flit is checked.
  logic [W-1:0] z_at_edge;
  always_comb z_at_edge = ref_inv(vec_t'(y_model), vec_t'(x), W) ? ~x : x;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
