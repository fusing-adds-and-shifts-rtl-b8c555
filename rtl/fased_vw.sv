// fased_vw: variable-width fused Booth dot product unit (8b x 2/4/8b weights).
//
// Four lanes, each an 8-bit activation a_i and a 2-bit weight segment w_i.
//   MODE_2B: four 2-bit weights; acc += sum a_i * w_i (4 products per cycle).
//   MODE_4B: weights {w3,w2} and {w1,w0}; a3 must equal a2 and a1 equal a0;
//            acc += a2 * {w3,w2} + a0 * {w1,w0} (2 products per cycle).
//   MODE_8B: one weight {w3,w2,w1,w0}; all a_i equal; acc += a0 * w
//            (1 product per cycle).
// A weight of several segments is handled as a multi-digit radix-4 Booth
// multiplication spread over the lanes: each lane's recoding table (brt_vw)
// pads its segment with the sign bit of the next lower segment of the same
// weight (or 0 for the lowest segment), so every lane yields one Booth digit
// magnitude times a_i, with the digit sign w_i[1]. Digits are aligned by
// conditional shifts of the left adder inputs: <<2 after lanes 3 and 1 in 4-
// and 8-bit modes, and <<4 after the left first-level adder in 8-bit mode.
// The signs are resolved exactly as in the fixed-width unit: each adder
// inverts its right input by the XOR of the two signs, with the XOR as carry-
// in, and the root sign w3[1] decides whether the accumulator adds or
// subtracts. The pads, shifts, widths (9, 11, 16 bits) and sign XORs follow
// the document. The mode encoding, en, clr and reset are this design's own.
// One operation per cycle; its result appears on acc one cycle later.
module fased_vw
  import fased_pkg::*;
#(
  parameter int unsigned A_W   = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  mode_e                   mode,
  input  logic signed [A_W-1:0]   a [4],
  input  logic        [1:0]       w [4],
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned PW  = A_W + 1;  // Booth recoding output
  localparam int unsigned SW  = PW + 2;   // after the <<2 shift
  localparam int unsigned L1W = SW + 1;   // first-level adder output
  localparam int unsigned L2W = L1W + 4;  // after <<4, second-level adder

  logic multi;  // weights span more than one segment (4- or 8-bit mode)
  logic wide;   // 8-bit mode

  assign multi = (mode == MODE_4B) || (mode == MODE_8B);
  assign wide  = (mode == MODE_8B);

  // Booth recoding. Lane i pads with the sign of segment i-1 when both belong
  // to the same weight.
  logic signed [PW-1:0] pp [4];
  logic                 pad_en [4];
  logic                 sgn [4];

  assign pad_en[0] = 1'b0;
  assign pad_en[1] = multi;
  assign pad_en[2] = wide;
  assign pad_en[3] = multi;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    brt_vw #(.A_W(A_W)) u_brt (
      .a        (a[i]),
      .w        (w[i]),
      .pad_en   (pad_en[i]),
      .w_lo_sign(i == 0 ? 1'b0 : w[(i == 0) ? 0 : i - 1][1]),
      .pp       (pp[i])
    );
    assign sgn[i] = w[i][1];
  end

  // Left inputs of the first level are shifted by 2 in 4- and 8-bit modes.
  logic signed [SW-1:0] sh3, sh1;
  cond_shift #(.IW(PW), .SH(2)) u_sh3 (.d(pp[3]), .en(multi), .q(sh3));
  cond_shift #(.IW(PW), .SH(2)) u_sh1 (.d(pp[1]), .en(multi), .q(sh1));

  logic signed [L1W-1:0] s32, s10;
  logic                  g32, g10;

  neg_add_node #(.LW(SW), .RW(PW), .OW(L1W)) u_add32 (
    .l(sh3), .l_sign(sgn[3]), .r(pp[2]), .r_sign(sgn[2]),
    .sum(s32), .sum_sign(g32)
  );
  neg_add_node #(.LW(SW), .RW(PW), .OW(L1W)) u_add10 (
    .l(sh1), .l_sign(sgn[1]), .r(pp[0]), .r_sign(sgn[0]),
    .sum(s10), .sum_sign(g10)
  );

  // The left first-level sum is shifted by 4 in 8-bit mode.
  logic signed [L2W-1:0] sh32;
  cond_shift #(.IW(L1W), .SH(4)) u_sh32 (.d(s32), .en(wide), .q(sh32));

  logic signed [L2W-1:0] root;
  logic                  root_sign;

  neg_add_node #(.LW(L2W), .RW(L1W), .OW(L2W)) u_add_root (
    .l(sh32), .l_sign(g32), .r(s10), .r_sign(g10),
    .sum(root), .sum_sign(root_sign)
  );

  fased_accumulator #(.IW(L2W), .ACC_W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .clr  (clr),
    .d    (root),
    .sign (root_sign),
    .acc  (acc)
  );

  // Usage rules of the wider modes: the activation of a multi-segment weight
  // is presented on every lane that weight covers, and mode is one of the
  // three encodings.
  a_mode_valid: assert property (@(posedge clk)
    en |-> (mode == MODE_2B || mode == MODE_4B || mode == MODE_8B));
  a_act_4b: assert property (@(posedge clk)
    (en && mode == MODE_4B) |-> (a[3] == a[2] && a[1] == a[0]));
  a_act_8b: assert property (@(posedge clk)
    (en && mode == MODE_8B) |-> (a[3] == a[0] && a[2] == a[0] && a[1] == a[0]));

endmodule
