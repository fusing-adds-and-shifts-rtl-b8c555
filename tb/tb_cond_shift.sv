// tb_cond_shift: self-check of the conditional shifter at the two sizes the
// variable-width unit uses (9 bits by 2, 12 bits by 4), with random inputs.
// Expected: d * 2^SH when enabled, d otherwise.
module tb_cond_shift;
  logic signed [8:0]  d9;
  logic signed [10:0] q11;
  logic signed [11:0] d12;
  logic signed [15:0] q16;
  logic               en;
  int checks = 0, failures = 0;

  cond_shift #(.IW(9),  .SH(2)) dut2 (.d(d9),  .en(en), .q(q11));
  cond_shift #(.IW(12), .SH(4)) dut4 (.d(d12), .en(en), .q(q16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e2, e4;
    for (int n = 0; n < 2000; n++) begin
      d9  = 9'($urandom);
      d12 = 12'($urandom);
      en  = 1'($urandom);
      #1;
      e2 = en ? int'(d9) * 4 : int'(d9);
      e4 = en ? int'(d12) * 16 : int'(d12);
      checks += 2;
      if (int'(q11) != e2) begin failures++; if (failures < 10) $display("FAIL sh2 d=%0d en=%b q=%0d", d9, en, q11); end
      if (int'(q16) != e4) begin failures++; if (failures < 10) $display("FAIL sh4 d=%0d en=%b q=%0d", d12, en, q16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
