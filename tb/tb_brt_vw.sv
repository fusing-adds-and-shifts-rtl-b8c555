// tb_brt_vw: exhaustive self-check of the variable-width Booth recoding table.
// For every activation, 2-bit segment, pad enable and lower sign bit, the
// expected output is |d| x a where d = -2*w[1] + w[0] + pad is the radix-4
// Booth digit of the padded group.
module tb_brt_vw;
  logic signed [7:0] a;
  logic        [1:0] w;
  logic              pad_en, lo;
  logic signed [8:0] pp;
  int checks = 0, failures = 0;

  brt_vw #(.A_W(8)) dut (.a(a), .w(w), .pad_en(pad_en), .w_lo_sign(lo), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, expv;
    for (int ai = -128; ai < 128; ai++) begin
      for (int k = 0; k < 16; k++) begin
        a      = 8'(ai);
        w      = k[1:0];
        pad_en = k[2];
        lo     = k[3];
        d      = -2 * int'(k[1]) + int'(k[0]) + ((k[2] && k[3]) ? 1 : 0);
        expv   = (d < 0 ? -d : d) * ai;
        #1;
        checks++;
        if (int'(pp) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d k=%b pp=%0d exp=%0d", ai, k[3:0], pp, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
