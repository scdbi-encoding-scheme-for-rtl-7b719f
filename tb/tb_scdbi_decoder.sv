// tb_scdbi_decoder: the decoder must return z when inv is low and its
// complement when inv is high; also checks decode(encode) round trips.
module tb_scdbi_decoder;
  logic [31:0] z, x;
  logic inv;
  int checks = 0, failures = 0;

  scdbi_decoder #(.W(32)) dut (.z(z), .inv(inv), .x(x));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] orig;
      orig = $urandom();
      inv  = 1'($urandom());
      z    = inv ? ~orig : orig;
      #1;
      checks++;
      if (x !== orig) begin
        failures++;
        $display("FAIL z=%h inv=%b x=%h expected %h", z, inv, x, orig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
