// fased_fw: fixed-width fused Booth dot product unit (8b x 2b weights).
//
// Computes acc += sum_i a_i * w_i for N signed activations a_i and N signed
// 2-bit weights w_i every cycle. Each lane's Booth recoding table produces
// only the magnitude product |w_i| x a_i, with the weight sign w_i[1] carried
// beside it. No lane has a negation adder. Instead the binary adder tree
// applies the signs: every adder conditionally inverts its right input by the
// XOR of the left and right signs and takes that XOR as its carry-in, and
// passes the left sign on as the sign of its result. The root sign is that of
// the most significant weight w_{N-1}; the accumulator adds or subtracts the
// tree output by it, again with the +1 on its carry-in. So the N increments
// of N negations land on the N-1 tree adders plus the accumulator.
//
// The structure, the lane order (left = higher index) and the widths (9-bit
// products, one bit more per tree level, 32-bit accumulator) follow the
// document; N is a parameter and must be a power of two. en, clr and rst_n
// are this design's own control (see fased_accumulator). One dot product is
// accepted per cycle; its sum appears on acc one cycle later.
module fased_fw #(
  parameter int unsigned N     = 4,
  parameter int unsigned A_W   = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [A_W-1:0]   a [N],
  input  logic        [1:0]       w [N],
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned TW     = A_W + 1 + LEVELS;  // widest tree value

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("fased_fw: N must be a power of two, got %0d", N);
  end

  // g_stage[k].val[j], g_stage[k].sgn[j]: result and outer sign of node j at
  // tree level k, sign-extended to TW bits. Level 0 holds the Booth recoding
  // outputs; level LEVELS holds the root.
  for (genvar k = 0; k <= LEVELS; k++) begin : g_stage
    localparam int unsigned NODES = N >> k;
    localparam int unsigned IW    = A_W + k;  // value width at level k is IW+1
    logic signed [TW-1:0] val [NODES];
    logic                 sgn [NODES];

    if (k == 0) begin : g_lanes
      for (genvar i = 0; i < N; i++) begin : g_lane
        logic signed [A_W:0] pp;
        brt_fw #(.A_W(A_W)) u_brt (.a(a[i]), .w(w[i]), .pp(pp));
        assign val[i] = TW'(pp);
        assign sgn[i] = w[i][1];
      end
    end else begin : g_nodes
      for (genvar j = 0; j < NODES; j++) begin : g_node
        logic signed [IW:0] s;
        neg_add_node #(.LW(IW), .RW(IW), .OW(IW + 1)) u_node (
          .l       (g_stage[k-1].val[2*j+1][IW-1:0]),
          .l_sign  (g_stage[k-1].sgn[2*j+1]),
          .r       (g_stage[k-1].val[2*j][IW-1:0]),
          .r_sign  (g_stage[k-1].sgn[2*j]),
          .sum     (s),
          .sum_sign(sgn[j])
        );
        assign val[j] = TW'(s);
      end
    end
  end

  fased_accumulator #(.IW(TW), .ACC_W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .clr  (clr),
    .d    (g_stage[LEVELS].val[0]),
    .sign (g_stage[LEVELS].sgn[0]),
    .acc  (acc)
  );

endmodule
