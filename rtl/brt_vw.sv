// brt_vw: modified Booth recoding table of the variable-width unit.
//
// The 2-bit weight segment w is padded on the right with either 0 or the sign
// bit of the next lower segment (w_lo_sign), giving a 3-bit radix-4 Booth
// group {w[1], w[0], pad}. The pad is 0 when pad_en is low, that is when this
// segment is the least significant one of its weight in the current mode.
// The group selects the magnitude of its Booth digit times a:
//   000, 111           -> 0
//   001, 010, 101, 110 -> a
//   011, 100           -> 2a
// This table and the 0 / lower-sign pad mux follow the document. The sign of
// the Booth digit is the group's top bit w[1]; it is applied downstream.
//
// Interface: a, w, pad_en, w_lo_sign in; pp = |digit| x a (A_W+1 bits, signed)
// out. Purely combinational.
module brt_vw #(
  parameter int unsigned A_W = 8
) (
  input  logic signed [A_W-1:0] a,
  input  logic        [1:0]     w,
  input  logic                  pad_en,
  input  logic                  w_lo_sign,
  output logic signed [A_W:0]   pp
);

  logic       pad;
  logic [2:0] group;

  assign pad   = pad_en ? w_lo_sign : 1'b0;
  assign group = {w, pad};

  always_comb begin
    unique case (group)
      3'b000, 3'b111:                 pp = '0;
      3'b001, 3'b010, 3'b101, 3'b110: pp = (A_W+1)'(a);
      3'b011, 3'b100:                 pp = {a, 1'b0};
      default:                        pp = '0;
    endcase
  end

endmodule
