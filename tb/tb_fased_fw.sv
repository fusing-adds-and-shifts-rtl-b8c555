// tb_fased_fw: self-check of the fixed-width fused dot product unit.
// First the worked example w = (-2, +1, -1, -1), a = (-3, 16, 3, 27) for lanes
// 3..0, whose dot product is -8. Then random streams with random enables and
// clears, checked every cycle against a reference sum computed here from the
// integer weights; this also checks the one-cycle latency. A second instance
// with N = 8 checks that the tree generalises. The test counts how often a
// tree adder subtracts (sign XOR = 1), the accumulator subtracts (top weight
// negative) and all weights are negative, and fails if one never happens.
module tb_fased_fw;
  localparam int N = 4;
  logic              clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [7:0] a [N];
  logic        [1:0] w [N];
  logic signed [7:0] a8 [8];
  logic        [1:0] w8 [8];
  logic signed [31:0] acc, acc8;
  longint ref4 = 0, ref8 = 0;
  int checks = 0, failures = 0;
  int n_node_sub = 0, n_acc_sub = 0, n_all_neg = 0;

  fased_fw dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .w(w), .acc(acc));
  fased_fw #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a8), .w(w8), .acc(acc8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wval(logic [1:0] x);
    return x[1] ? int'(x) - 4 : int'(x);
  endfunction

  task automatic step(bit do_en, bit do_clr);
    longint p4 = 0, p8 = 0;
    en  = do_en;
    clr = do_clr;
    for (int i = 0; i < N; i++) p4 += longint'(a[i]) * wval(w[i]);
    for (int i = 0; i < 8; i++) p8 += longint'(a8[i]) * wval(w8[i]);
    if (do_en) begin
      ref4 = (do_clr ? 0 : ref4) + p4;
      ref8 = (do_clr ? 0 : ref8) + p8;
      if (w[3][1] ^ w[2][1]) n_node_sub++;
      if (w[1][1] ^ w[0][1]) n_node_sub++;
      if (w[3][1] ^ w[1][1]) n_node_sub++;
      if (w[3][1]) n_acc_sub++;
      if (w[3][1] && w[2][1] && w[1][1] && w[0][1]) n_all_neg++;
    end else if (do_clr) begin
      ref4 = 0;
      ref8 = 0;
    end
    ref4 = longint'(int'(ref4));
    ref8 = longint'(int'(ref8));
    @(posedge clk);
    #1;
    checks += 2;
    if (longint'(acc) != ref4) begin
      failures++;
      if (failures < 10) $display("FAIL N=4 acc=%0d exp=%0d", acc, ref4);
    end
    if (longint'(acc8) != ref8) begin
      failures++;
      if (failures < 10) $display("FAIL N=8 acc=%0d exp=%0d", acc8, ref8);
    end
    @(negedge clk);
  endtask

  initial begin
    foreach (a[i]) begin a[i] = '0; w[i] = '0; end
    foreach (a8[i]) begin a8[i] = '0; w8[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Worked example: expected accumulator -8 after one operation.
    a[3] = -8'sd3; w[3] = 2'b10;  // -2
    a[2] = 8'sd16; w[2] = 2'b01;  // +1
    a[1] = 8'sd3;  w[1] = 2'b11;  // -1
    a[0] = 8'sd27; w[0] = 2'b11;  // -1
    step(1'b1, 1'b1);
    checks++;
    if (acc != -32'sd8) begin
      failures++;
      $display("FAIL worked example acc=%0d exp=-8", acc);
    end

    // Extremes: all weights -2 with a = -128 (largest positive products).
    foreach (a[i]) begin a[i] = -8'sd128; w[i] = 2'b10; end
    foreach (a8[i]) begin a8[i] = -8'sd128; w8[i] = 2'b10; end
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);

    for (int n = 0; n < 20000; n++) begin
      foreach (a[i]) begin a[i] = 8'($urandom); w[i] = 2'($urandom); end
      foreach (a8[i]) begin a8[i] = 8'($urandom); w8[i] = 2'($urandom); end
      step(($urandom % 8) != 0, ($urandom % 64) == 0);
    end

    checks += 3;
    if (n_node_sub == 0) failures++;
    if (n_acc_sub == 0)  failures++;
    if (n_all_neg == 0)  failures++;
    $display("tree subtractions=%0d accumulator subtractions=%0d all-negative=%0d",
             n_node_sub, n_acc_sub, n_all_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
