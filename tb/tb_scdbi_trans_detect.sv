// tb_scdbi_trans_detect: checks the per-line and per-pair transition flags
// against scdbi_ref_pkg's pair classification, first on the transfers of
// the SCDBI transition table (one pair at a time) and then on random
// 32-bit flits.
module tb_scdbi_trans_detect;
  import scdbi_ref_pkg::*;

  localparam int unsigned W = 32;

  logic [W-1:0] x, y, t01, t00;
  logic [W-2:0] t2, t4ss;
  int checks = 0, failures = 0;

  scdbi_trans_detect #(.W(W)) dut (.x(x), .y(y), .t01(t01), .t00(t00), .t2(t2), .t4ss(t4ss));

  task automatic check_all();
    for (int unsigned i = 0; i < W; i++) begin
      checks++;
      if (t01[i] !== (y[i] == 1'b0 && x[i] == 1'b1) || t00[i] !== (y[i] == 1'b0 && x[i] == 1'b0)) begin
        failures++;
        $display("FAIL line %0d y=%b x=%b t01=%b t00=%b", i, y[i], x[i], t01[i], t00[i]);
      end
    end
    for (int unsigned i = 0; i + 1 < W; i++) begin
      int unsigned t;
      logic exp2, exp4;
      t = pair_type(y[i], y[i+1], x[i], x[i+1]);
      exp2 = (t == 2);
      // T4**: Type IV on a pair whose two lines differ.
      exp4 = (t == 4) && (y[i] != y[i+1]);
      checks++;
      if (t2[i] !== exp2 || t4ss[i] !== exp4) begin
        failures++;
        $display("FAIL pair %0d y=%b%b x=%b%b t2=%b t4ss=%b", i, y[i], y[i+1], x[i], x[i+1], t2[i], t4ss[i]);
      end
    end
  endtask

  initial begin
    // Every 2-bit pair transfer on lines 0/1 and 5/6, others held.
    for (int p = 0; p < 16; p++) begin
      y = '0; x = '0;
      y[1:0] = p[3:2]; x[1:0] = p[1:0];
      y[6:5] = p[1:0]; x[6:5] = p[3:2];
      #1 check_all();
    end
    // Table examples: 01->10 is Type II, 01->01 is T4**, 00->00 is neither.
    y = '0; x = '0; y[1:0] = 2'b01; x[1:0] = 2'b10;
    #1 checks++; if (t2[0] !== 1'b1 || t4ss[0] !== 1'b0) failures++;
    x[1:0] = 2'b01;
    #1 checks++; if (t2[0] !== 1'b0 || t4ss[0] !== 1'b1) failures++;
    y[1:0] = 2'b00; x[1:0] = 2'b00;
    #1 checks++; if (t2[0] !== 1'b0 || t4ss[0] !== 1'b0 || t00[1:0] !== 2'b11) failures++;
    for (int n = 0; n < 300; n++) begin
      x = $urandom(); y = $urandom();
      #1 check_all();
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
