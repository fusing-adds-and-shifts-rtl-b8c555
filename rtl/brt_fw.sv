// brt_fw: radix-4 Booth recoding table for a 2-bit signed weight.
//
// A 2-bit two's complement weight w lies in {-2,-1,0,1}, so its magnitude is
// 0, 1 or 2. This block is the magnitude-select mux of a radix-4 Booth
// multiplier: it outputs |w| x a, choosing between 0, a and 2a (a shifted left
// by one). The sign of w is not applied here; it is w[1], and the adder tree
// that follows applies it. The mux table (w = 10 -> 2a, 11 -> a, 01 -> a,
// 00 -> 0) follows the document; the output is sign-extended to A_W+1 bits.
//
// Interface: a (signed activation), w (2-bit weight) in; pp = |w| x a out.
// Purely combinational.
module brt_fw #(
  parameter int unsigned A_W = 8
) (
  input  logic signed [A_W-1:0] a,
  input  logic        [1:0]     w,
  output logic signed [A_W:0]   pp
);

  always_comb begin
    unique case (w)
      2'b00:        pp = '0;
      2'b01, 2'b11: pp = (A_W+1)'(a);
      2'b10:        pp = {a, 1'b0};
      default:      pp = '0;
    endcase
  end

endmodule
