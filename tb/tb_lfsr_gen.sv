// tb_lfsr_gen: checks the LFSR three ways. A 4-bit instance with
// x^4 + x^3 + 1 and a 5-bit one with x^5 + x^3 + 1 must visit every
// non-zero state once before returning to the seed (maximal period 15 and
// 31). The default 32-bit instance is compared over 5000 steps with a
// Fibonacci-form shift register for the same polynomial: its output bit
// stream must satisfy s[n+32] = s[n+31] ^ s[n+30] ^ s[n+10] ^ s[n]
// (the recurrence of the reciprocal polynomial, which is what a right-
// shifting Galois register produces); it must also hold still when step
// is low and never reach zero.
module tb_lfsr_gen;
  logic clk = 0, rst_n = 0, step = 0;
  logic [3:0]  v4;
  logic [4:0]  v5;
  logic [31:0] v32;
  int checks = 0, failures = 0;

  lfsr_gen #(.W(4), .POLY(4'b1100), .SEED(4'h1))   dut4  (.clk(clk), .rst_n(rst_n), .step(step), .value(v4));
  lfsr_gen #(.W(5), .POLY(5'b10100), .SEED(5'h1))  dut5  (.clk(clk), .rst_n(rst_n), .step(step), .value(v5));
  lfsr_gen dut32 (.clk(clk), .rst_n(rst_n), .step(step), .value(v32));

  always #5 clk = ~clk;

  bit seen4[16];
  bit seen5[32];
  bit s[$];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (v4 !== 4'h1 || v5 !== 5'h1 || v32 !== 32'h1) begin failures++; $display("FAIL seed"); end
    // Hold.
    repeat (3) @(posedge clk);
    #1 checks++;
    if (v32 !== 32'h1) begin failures++; $display("FAIL moved without step"); end
    step = 1;
    for (int n = 0; n < 5100; n++) begin
      if (n < 15) begin
        checks++;
        if (v4 == 0 || seen4[v4]) begin failures++; $display("FAIL 4-bit repeat at %0d", n); end
        seen4[v4] = 1;
      end
      if (n == 15) begin checks++; if (v4 !== 4'h1) begin failures++; $display("FAIL 4-bit period"); end end
      if (n < 31) begin
        checks++;
        if (v5 == 0 || seen5[v5]) begin failures++; $display("FAIL 5-bit repeat at %0d", n); end
        seen5[v5] = 1;
      end
      if (n == 31) begin checks++; if (v5 !== 5'h1) begin failures++; $display("FAIL 5-bit period"); end end
      if (v32 == 0) begin failures++; checks++; end
      s.push_back(v32[0]);
      @(posedge clk); #1;
    end
    for (int n = 0; n + 32 < s.size(); n++) begin
      checks++;
      if (s[n+32] !== (s[n+31] ^ s[n+30] ^ s[n+10] ^ s[n])) begin
        failures++;
        if (failures < 5) $display("FAIL recurrence at %0d", n);
      end
    end
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
