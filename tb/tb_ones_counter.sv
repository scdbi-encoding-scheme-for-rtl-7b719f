// tb_ones_counter: checks the population count against $countones for a
// 32-bit and a 7-bit counter: all-zero, all-one, one-hot and random inputs.
module tb_ones_counter;
  logic [31:0] a;
  logic [5:0]  ca;
  logic [6:0]  b;
  logic [2:0]  cb;
  int checks = 0, failures = 0;

  ones_counter #(.N(32)) dut32 (.bits(a), .count(ca));
  ones_counter #(.N(7))  dut7  (.bits(b), .count(cb));

  task automatic chk();
    #1;
    checks++;
    if (ca !== 6'($countones(a)) || cb !== 3'($countones(b))) begin
      failures++;
      $display("FAIL a=%h count=%0d b=%b count=%0d", a, ca, b, cb);
    end
  endtask

  initial begin
    a = '0; b = '0; chk();
    a = '1; b = '1; chk();
    for (int i = 0; i < 32; i++) begin a = 32'd1 << i; b = 7'(1 << (i % 7)); chk(); end
    for (int i = 0; i < 500; i++) begin a = $urandom(); b = 7'($urandom()); chk(); end
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
