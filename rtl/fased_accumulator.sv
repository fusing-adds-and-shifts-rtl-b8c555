// fased_accumulator: sign resolution and accumulation at the root of the tree.
//
// The adder tree leaves one outer sign unresolved, the sign of the most
// significant weight. This stage adds the tree output d to the accumulator
// when sign is 0 and subtracts it when sign is 1: it inverts d and uses the
// accumulator adder's carry-in as the +1. That carry-in is what lets every
// negative weight be absorbed without separate incrementers; this follows the
// document, as does the 32-bit accumulator width.
//
// Control is this design's own choice: when en is high the accumulator is
// updated on the rising clock edge; clr makes that update start from zero
// (clr alone clears it). rst_n is an asynchronous active-low reset to zero.
// The sum of the inputs presented in cycle t is visible on acc in cycle t+1.
module fased_accumulator #(
  parameter int unsigned IW    = 11,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [IW-1:0]    d,
  input  logic                    sign,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] d_ext;
  logic signed [ACC_W-1:0] d_sel;
  logic signed [ACC_W-1:0] base;
  logic signed [ACC_W-1:0] nxt;

  assign d_ext = ACC_W'(d);
  assign d_sel = sign ? ~d_ext : d_ext;
  assign base  = clr ? '0 : acc;
  assign nxt   = base + d_sel + ACC_W'(sign);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= nxt;
    else if (clr) acc <= '0;
  end

endmodule
