// tb_brt_fw: exhaustive self-check of the fixed-width Booth recoding table.
// Every 8-bit activation is paired with every 2-bit weight; the expected
// output |w| x a is computed here from the integer value of w.
module tb_brt_fw;
  logic signed [7:0] a;
  logic        [1:0] w;
  logic signed [8:0] pp;
  int checks = 0, failures = 0;

  brt_fw #(.A_W(8)) dut (.a(a), .w(w), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wv, expv;
    for (int ai = -128; ai < 128; ai++) begin
      for (int wi = 0; wi < 4; wi++) begin
        a  = 8'(ai);
        w  = 2'(wi);
        wv = (wi >= 2) ? wi - 4 : wi;
        expv = (wv < 0 ? -wv : wv) * ai;
        #1;
        checks++;
        if (int'(pp) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d w=%0d pp=%0d exp=%0d", ai, wv, pp, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
