// tb_fased_accumulator: self-check of the sign-resolving accumulator.
// Random inputs, signs, enables and clears are applied for many cycles; a
// reference sum kept here is compared with acc every cycle, which also checks
// the one-cycle latency from en to acc.
module tb_fased_accumulator;
  logic               clk = 0, rst_n = 0, en = 0, clr = 0, sign = 0;
  logic signed [15:0] d = '0;
  logic signed [31:0] acc;
  longint             ref_acc = 0;
  int checks = 0, failures = 0;
  int n_sub = 0, n_clr = 0, n_hold = 0;

  fased_accumulator #(.IW(16), .ACC_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(d), .sign(sign), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (acc != 0) failures++;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en   = ($urandom % 8) != 0;
      clr  = ($urandom % 32) == 0;
      sign = 1'($urandom);
      d    = 16'($urandom);
      // Model of the register update at the next edge.
      if (en) begin
        ref_acc = (clr ? 0 : ref_acc) + (sign ? -longint'(d) : longint'(d));
        if (sign) n_sub++;
      end else if (clr) ref_acc = 0;
      if (clr) n_clr++;
      if (!en && !clr) n_hold++;
      ref_acc = longint'(int'(ref_acc));  // wrap to 32 bits
      @(posedge clk);
      #1;
      checks++;
      if (longint'(acc) != ref_acc) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d acc=%0d exp=%0d", n, acc, ref_acc);
      end
    end
    checks += 3;
    if (n_sub == 0)  failures++;
    if (n_clr == 0)  failures++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
