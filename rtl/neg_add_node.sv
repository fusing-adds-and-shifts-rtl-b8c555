// neg_add_node: one adder of the fused adder tree.
//
// Each input carries a value and a sign: the value is a magnitude-style
// partial result and the sign says whether it still has to be negated. The
// node rewrites the sum so that only the right input is ever negated:
//    l + r = +(l + r)     l - r = +(l - r)
//   -l + r = -(l - r)    -l - r = -(l + r)
// The XOR of the two signs selects the inverted right input and is also the
// adder's carry-in, which supplies the +1 of two's complement negation. The
// left sign is passed on as the outer sign of the result, to be resolved at
// the next level. This rewriting follows the document; the widths are
// parameters, and the right input is sign-extended to the output width
// before it is inverted so that negating its most negative value is exact.
//
// Interface: l, l_sign, r, r_sign in; sum, sum_sign out. Combinational.
module neg_add_node #(
  parameter int unsigned LW = 9,
  parameter int unsigned RW = 9,
  parameter int unsigned OW = 10
) (
  input  logic signed [LW-1:0] l,
  input  logic                 l_sign,
  input  logic signed [RW-1:0] r,
  input  logic                 r_sign,
  output logic signed [OW-1:0] sum,
  output logic                 sum_sign
);

  logic                 sub;
  logic signed [OW-1:0] l_ext;
  logic signed [OW-1:0] r_ext;
  logic signed [OW-1:0] r_sel;

  assign sub      = l_sign ^ r_sign;
  assign l_ext    = OW'(l);
  assign r_ext    = OW'(r);
  assign r_sel    = sub ? ~r_ext : r_ext;
  assign sum      = l_ext + r_sel + OW'(sub);
  assign sum_sign = l_sign;

endmodule
