// tb_neg_add_node: self-check of one fused adder-tree node.
// With outer sign s = l_sign, the node must satisfy
//   (s ? -sum : sum) == (l_sign ? -l : l) + (r_sign ? -r : r)
// and pass l_sign on as sum_sign. Random values at the first-level size of the
// variable-width unit (11-bit left, 9-bit right, 12-bit sum), plus the corner
// where the right input is its most negative value.
module tb_neg_add_node;
  logic signed [10:0] l;
  logic signed [8:0]  r;
  logic               ls, rs;
  logic signed [11:0] sum;
  logic               ss;
  int checks = 0, failures = 0;
  int n_sub = 0;

  neg_add_node #(.LW(11), .RW(9), .OW(12)) dut (
    .l(l), .l_sign(ls), .r(r), .r_sign(rs), .sum(sum), .sum_sign(ss));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int lv, rv, got;
    #1;
    lv  = ls ? -int'(l) : int'(l);
    rv  = rs ? -int'(r) : int'(r);
    got = ss ? -int'(sum) : int'(sum);
    checks += 2;
    if (ls ^ rs) n_sub++;
    if (got != lv + rv) begin
      failures++;
      if (failures < 10) $display("FAIL l=%0d ls=%b r=%0d rs=%b sum=%0d", l, ls, r, rs, sum);
    end
    if (ss != ls) failures++;
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      l  = 11'($urandom);
      r  = 9'($urandom);
      ls = 1'($urandom);
      rs = 1'($urandom);
      check();
    end
    l = 11'sd0; r = -9'sd256; ls = 1'b0; rs = 1'b1; check();
    l = -11'sd1024; r = -9'sd256; ls = 1'b1; rs = 1'b0; check();
    checks++;
    if (n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
