// tb_fased_vw: self-check of the variable-width fused dot product unit.
// First the worked example in 4-bit mode: a = (0, 0, 3, 3), weights 0 and -5
// ({w3,w2} = 0000, {w1,w0} = 1011), giving -15. Then random operations in all
// three modes, with the mode changing between operations, random enables and
// clears, checked every cycle against a reference computed here from the
// integer weights (2-bit weights, two 4-bit weights, one 8-bit weight). This
// also checks the one-cycle latency. The test counts each mode, mode changes,
// the <<2 and <<4 shifts, Booth pads taken from a lower segment, subtracting
// tree adders and accumulator subtractions, and fails if one never happens.
module tb_fased_vw
  import fased_pkg::*;
;
  logic              clk = 0, rst_n = 0, en = 0, clr = 0;
  mode_e             mode = MODE_2B;
  logic signed [7:0] a [4];
  logic        [1:0] w [4];
  logic signed [31:0] acc;
  longint ref_acc = 0;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_switch = 0, n_sh2 = 0, n_sh4 = 0, n_pad = 0, n_node_sub = 0, n_acc_sub = 0;
  mode_e last_mode = MODE_2B;

  fased_vw dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .mode(mode),
                .a(a), .w(w), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integer value of the weights in the current mode, times the activations.
  function automatic longint product();
    logic signed [1:0] w2 [4];
    logic signed [3:0] hi4, lo4;
    logic signed [7:0] w8;
    longint p = 0;
    foreach (w[i]) w2[i] = w[i];
    hi4 = {w[3], w[2]};
    lo4 = {w[1], w[0]};
    w8  = {w[3], w[2], w[1], w[0]};
    case (mode)
      MODE_2B: foreach (w2[i]) p += longint'(a[i]) * longint'(w2[i]);
      MODE_4B: p = longint'(a[2]) * longint'(hi4) + longint'(a[0]) * longint'(lo4);
      default: p = longint'(a[0]) * longint'(w8);
    endcase
    return p;
  endfunction

  task automatic step(bit do_en, bit do_clr);
    en  = do_en;
    clr = do_clr;
    if (do_en) begin
      ref_acc = (do_clr ? 0 : ref_acc) + product();
      n_mode[int'(mode)]++;
      if (mode != last_mode) n_switch++;
      last_mode = mode;
      if (mode != MODE_2B) n_sh2++;
      if (mode == MODE_8B) n_sh4++;
      if ((mode != MODE_2B && (w[0][1] || w[2][1])) || (mode == MODE_8B && w[1][1])) n_pad++;
      if (w[3][1] ^ w[2][1]) n_node_sub++;
      if (w[1][1] ^ w[0][1]) n_node_sub++;
      if (w[3][1] ^ w[1][1]) n_node_sub++;
      if (w[3][1]) n_acc_sub++;
    end else if (do_clr) ref_acc = 0;
    ref_acc = longint'(int'(ref_acc));
    @(posedge clk);
    #1;
    checks++;
    if (longint'(acc) != ref_acc) begin
      failures++;
      if (failures < 10) $display("FAIL mode=%s acc=%0d exp=%0d", mode.name(), acc, ref_acc);
    end
    @(negedge clk);
  endtask

  task automatic random_operands();
    logic signed [7:0] x;
    foreach (w[i]) w[i] = 2'($urandom);
    case (mode)
      MODE_2B: foreach (a[i]) a[i] = 8'($urandom);
      MODE_4B: begin
        a[3] = 8'($urandom); a[2] = a[3];
        a[1] = 8'($urandom); a[0] = a[1];
      end
      default: begin
        x = 8'($urandom);
        foreach (a[i]) a[i] = x;
      end
    endcase
  endtask

  initial begin
    foreach (a[i]) begin a[i] = '0; w[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Worked example, 4-bit mode: 0 * 0 + 3 * (-5) = -15.
    mode = MODE_4B;
    a[3] = 0; a[2] = 0; a[1] = 8'sd3; a[0] = 8'sd3;
    w[3] = 2'b00; w[2] = 2'b00; w[1] = 2'b10; w[0] = 2'b11;
    step(1'b1, 1'b1);
    checks++;
    if (acc != -32'sd15) begin
      failures++;
      $display("FAIL worked example acc=%0d exp=-15", acc);
    end

    // Extremes of 8-bit mode: -128 * -128 and -128 * 127.
    mode = MODE_8B;
    foreach (a[i]) a[i] = -8'sd128;
    w[3] = 2'b10; w[2] = 2'b00; w[1] = 2'b00; w[0] = 2'b00;
    step(1'b1, 1'b1);
    checks++;
    if (acc != 32'sd16384) begin
      failures++;
      $display("FAIL -128*-128 acc=%0d", acc);
    end
    w[3] = 2'b01; w[2] = 2'b11; w[1] = 2'b11; w[0] = 2'b11;
    step(1'b1, 1'b0);

    for (int n = 0; n < 30000; n++) begin
      mode = mode_e'($urandom % 3);
      random_operands();
      step(($urandom % 8) != 0, ($urandom % 64) == 0);
    end

    checks += 9;
    foreach (n_mode[i]) if (n_mode[i] == 0) failures++;
    if (n_switch == 0)   failures++;
    if (n_sh2 == 0)      failures++;
    if (n_sh4 == 0)      failures++;
    if (n_pad == 0)      failures++;
    if (n_node_sub == 0) failures++;
    if (n_acc_sub == 0)  failures++;
    $display("modes 2b/4b/8b=%0d/%0d/%0d switches=%0d sh2=%0d sh4=%0d pads=%0d subs=%0d acc_subs=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_switch, n_sh2, n_sh4, n_pad, n_node_sub, n_acc_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
