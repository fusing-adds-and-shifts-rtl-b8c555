// fased_pkg: types and constants shared by the FASED dot product units.
//
// The variable-width unit works in one of three weight-width modes. In 2-bit
// mode the four 2-bit weight segments are four separate weights; in 4-bit
// mode segments {w3,w2} and {w1,w0} form two 4-bit weights; in 8-bit mode all
// four segments form one 8-bit weight. The mode names follow the text; the
// binary encoding is this design's own choice.
package fased_pkg;

  typedef enum logic [1:0] {
    MODE_2B = 2'd0,
    MODE_4B = 2'd1,
    MODE_8B = 2'd2
  } mode_e;

endpackage
