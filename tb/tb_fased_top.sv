// tb_fased_top: end-to-end test of both dot product units at their default
// sizes (4 lanes, 8-bit activations, 32-bit accumulators).
//
// Part 1, vectors: a 64-element dot product of 8-bit activations and weights
// of 2, 4 and 8 bits is streamed through the units. The fixed-width unit and
// the variable-width unit in 2-bit mode take 4 elements per cycle (16 cycles),
// the variable-width unit takes 2 per cycle in 4-bit mode (32 cycles) and 1 in
// 8-bit mode (64 cycles). The result must be on acc exactly one cycle after the
// last operation; the cycle counts are checked.
// Part 2, random: both units run random operations with random enables,
// clears and (variable-width) modes, checked every cycle against reference
// sums computed here.
// Mechanisms counted, each of which must occur: tree adders that subtract,
// accumulator subtractions, all four weights negative, each VW mode, mode
// changes, the <<2 and <<4 alignment shifts, Booth pads taken from a lower
// segment, clears, and cycles with en low (accumulator holds).
module tb_fased_top
  import fased_pkg::*;
;
  localparam int L = 64;  // vector length of part 1

  logic               clk = 0, rst_n = 0;
  logic               fw_en = 0, fw_clr = 0, vw_en = 0, vw_clr = 0;
  mode_e              vw_mode = MODE_2B;
  logic signed [7:0]  fw_a [4], vw_a [4];
  logic        [1:0]  fw_w [4], vw_w [4];
  logic signed [31:0] fw_acc, vw_acc;
  longint fw_ref = 0, vw_ref = 0;
  int checks = 0, failures = 0;
  int n_node_sub = 0, n_acc_sub = 0, n_all_neg = 0, n_switch = 0;
  int n_sh2 = 0, n_sh4 = 0, n_pad = 0, n_clr = 0, n_hold = 0;
  int n_mode [3] = '{0, 0, 0};
  mode_e last_mode = MODE_2B;

  fased_top dut (
    .clk(clk), .rst_n(rst_n),
    .fw_en(fw_en), .fw_clr(fw_clr), .fw_a(fw_a), .fw_w(fw_w), .fw_acc(fw_acc),
    .vw_en(vw_en), .vw_clr(vw_clr), .vw_mode(vw_mode), .vw_a(vw_a), .vw_w(vw_w),
    .vw_acc(vw_acc)
  );

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [7:0] v, int bits);
    longint x = longint'(v) & ((64'sd1 <<< bits) - 1);
    return (x >= (64'sd1 <<< (bits - 1))) ? x - (64'sd1 <<< bits) : x;
  endfunction

  function automatic longint vw_product();
    longint p = 0;
    case (vw_mode)
      MODE_2B: foreach (vw_w[i]) p += longint'(vw_a[i]) * sx(8'(vw_w[i]), 2);
      MODE_4B: p = longint'(vw_a[2]) * sx(8'({vw_w[3], vw_w[2]}), 4)
                 + longint'(vw_a[0]) * sx(8'({vw_w[1], vw_w[0]}), 4);
      default: p = longint'(vw_a[0]) * sx({vw_w[3], vw_w[2], vw_w[1], vw_w[0]}, 8);
    endcase
    return p;
  endfunction

  function automatic void count_signs(logic [1:0] w [4]);
    if (w[3][1] ^ w[2][1]) n_node_sub++;
    if (w[1][1] ^ w[0][1]) n_node_sub++;
    if (w[3][1] ^ w[1][1]) n_node_sub++;
    if (w[3][1]) n_acc_sub++;
    if (w[3][1] && w[2][1] && w[1][1] && w[0][1]) n_all_neg++;
  endfunction

  // Apply one cycle of inputs (already set on the ports) and check both
  // accumulators after the edge.
  task automatic step();
    longint pf = 0;
    foreach (fw_w[i]) pf += longint'(fw_a[i]) * sx(8'(fw_w[i]), 2);
    if (fw_en) begin
      fw_ref = (fw_clr ? 0 : fw_ref) + pf;
      count_signs(fw_w);
    end else if (fw_clr) fw_ref = 0;
    if (vw_en) begin
      vw_ref = (vw_clr ? 0 : vw_ref) + vw_product();
      count_signs(vw_w);
      n_mode[int'(vw_mode)]++;
      if (vw_mode != last_mode) n_switch++;
      last_mode = vw_mode;
      if (vw_mode != MODE_2B) n_sh2++;
      if (vw_mode == MODE_8B) n_sh4++;
      if ((vw_mode != MODE_2B && (vw_w[0][1] || vw_w[2][1])) ||
          (vw_mode == MODE_8B && vw_w[1][1])) n_pad++;
    end else if (vw_clr) vw_ref = 0;
    if (fw_clr || vw_clr) n_clr++;
    if (!fw_en || !vw_en) n_hold++;
    fw_ref = longint'(int'(fw_ref));
    vw_ref = longint'(int'(vw_ref));
    @(posedge clk);
    #1;
    checks += 2;
    if (longint'(fw_acc) != fw_ref) begin
      failures++;
      if (failures < 10) $display("FAIL fw acc=%0d exp=%0d", fw_acc, fw_ref);
    end
    if (longint'(vw_acc) != vw_ref) begin
      failures++;
      if (failures < 10) $display("FAIL vw mode=%s acc=%0d exp=%0d", vw_mode.name(), vw_acc, vw_ref);
    end
    @(negedge clk);
  endtask

  // Part 1: stream an L-element dot product with b-bit weights.
  task automatic vector_run(int bits);
    logic signed [7:0] av [L];
    logic        [7:0] wv [L];
    longint expect_v = 0;
    int per_cycle = 8 / bits;
    int ops = L / per_cycle;
    int start, done;
    for (int k = 0; k < L; k++) begin
      av[k] = 8'($urandom);
      wv[k] = 8'($urandom);
      expect_v += longint'(av[k]) * sx(wv[k], bits);
    end
    vw_mode = (bits == 2) ? MODE_2B : (bits == 4) ? MODE_4B : MODE_8B;
    start = cycle;
    for (int op = 0; op < ops; op++) begin
      for (int s = 0; s < 4; s++) begin
        // Lane s carries 2-bit segment (s mod (bits/2)) of element k.
        int seg = s % (bits / 2);
        int k   = op * per_cycle + s / (bits / 2);
        vw_a[s] = av[k];
        vw_w[s] = wv[k][2*seg +: 2];
      end
      vw_en  = 1'b1;
      vw_clr = (op == 0);
      if (bits == 2) begin
        fw_a = vw_a;
        fw_w = vw_w;
        fw_en  = 1'b1;
      end else fw_en = 1'b0;
      fw_clr = (op == 0);
      step();
    end
    done = cycle - start;
    vw_en = 0; vw_clr = 0; fw_en = 0; fw_clr = 0;
    checks += 2;
    if (vw_acc != 32'(expect_v)) begin
      failures++;
      $display("FAIL vector %0d-bit vw=%0d exp=%0d", bits, vw_acc, expect_v);
    end
    if (done != ops) begin
      failures++;
      $display("FAIL vector %0d-bit took %0d cycles, expected %0d", bits, done, ops);
    end
    if (bits == 2) begin
      checks++;
      if (fw_acc != 32'(expect_v)) begin
        failures++;
        $display("FAIL vector 2-bit fw=%0d exp=%0d", fw_acc, expect_v);
      end
    end
    $display("%0d-element dot product, %0d-bit weights: %0d cycles, result %0d",
             L, bits, done, vw_acc);
  endtask

  initial begin
    foreach (fw_a[i]) begin fw_a[i] = '0; fw_w[i] = '0; vw_a[i] = '0; vw_w[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks += 2;
    if (fw_acc != 0) failures++;
    if (vw_acc != 0) failures++;

    vector_run(2);
    vector_run(4);
    vector_run(8);

    for (int n = 0; n < 20000; n++) begin
      logic signed [7:0] x, y;
      foreach (fw_a[i]) begin fw_a[i] = 8'($urandom); fw_w[i] = 2'($urandom); end
      vw_mode = mode_e'($urandom % 3);
      foreach (vw_w[i]) vw_w[i] = 2'($urandom);
      x = 8'($urandom);
      y = 8'($urandom);
      case (vw_mode)
        MODE_2B: foreach (vw_a[i]) vw_a[i] = 8'($urandom);
        MODE_4B: begin vw_a[3] = x; vw_a[2] = x; vw_a[1] = y; vw_a[0] = y; end
        default: foreach (vw_a[i]) vw_a[i] = x;
      endcase
      fw_en  = ($urandom % 8) != 0;
      vw_en  = ($urandom % 8) != 0;
      fw_clr = ($urandom % 64) == 0;
      vw_clr = ($urandom % 64) == 0;
      step();
    end

    checks += 12;
    if (n_node_sub == 0) failures++;
    if (n_acc_sub == 0)  failures++;
    if (n_all_neg == 0)  failures++;
    foreach (n_mode[i]) if (n_mode[i] == 0) failures++;
    if (n_switch == 0)   failures++;
    if (n_sh2 == 0)      failures++;
    if (n_sh4 == 0)      failures++;
    if (n_pad == 0)      failures++;
    if (n_clr == 0)      failures++;
    if (n_hold == 0)     failures++;
    $display("tree subtractions=%0d accumulator subtractions=%0d all-negative=%0d",
             n_node_sub, n_acc_sub, n_all_neg);
    $display("vw modes 2b/4b/8b=%0d/%0d/%0d switches=%0d sh2=%0d sh4=%0d pads=%0d clears=%0d holds=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_switch, n_sh2, n_sh4, n_pad, n_clr, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
