// cond_shift: conditional left shift on an adder's left input.
//
// In the variable-width unit the partial products of higher weight segments
// must be aligned before they are added: by 2 bits in 4- and 8-bit modes
// after BRT_3 and BRT_1, and by 4 bits in 8-bit mode after the left
// first-level adder. When en is high, q = d << SH; otherwise q is d
// sign-extended. The output is SH bits wider than the input so nothing is
// lost. The shift amounts and where they sit follow the document.
//
// Interface: d, en in; q out. Purely combinational.
module cond_shift #(
  parameter int unsigned IW = 9,
  parameter int unsigned SH = 2
) (
  input  logic signed [IW-1:0]    d,
  input  logic                    en,
  output logic signed [IW+SH-1:0] q
);

  logic signed [IW+SH-1:0] ext;

  assign ext = (IW+SH)'(d);
  assign q   = en ? (ext <<< SH) : ext;

endmodule
