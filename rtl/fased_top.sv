// fased_top: the two FASED dot product units side by side.
//
// FASED-FW (fased_fw) computes 4-input 8-bit x 2-bit signed dot products into
// a 32-bit accumulator, one per cycle. FASED-VW (fased_vw) computes the same
// with weights of 2, 4 or 8 bits, selected by vw_mode, delivering 4, 2 or 1
// products per cycle. The two units are independent; each has its own
// control, operands and accumulator, and both share clock and reset. Results
// appear on the accumulator outputs one cycle after en.
module fased_top
  import fased_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned A_W   = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // fixed-width unit
  input  logic                    fw_en,
  input  logic                    fw_clr,
  input  logic signed [A_W-1:0]   fw_a [N],
  input  logic        [1:0]       fw_w [N],
  output logic signed [ACC_W-1:0] fw_acc,
  // variable-width unit
  input  logic                    vw_en,
  input  logic                    vw_clr,
  input  mode_e                   vw_mode,
  input  logic signed [A_W-1:0]   vw_a [4],
  input  logic        [1:0]       vw_w [4],
  output logic signed [ACC_W-1:0] vw_acc
);

  fased_fw #(.N(N), .A_W(A_W), .ACC_W(ACC_W)) u_fw (
    .clk(clk), .rst_n(rst_n), .en(fw_en), .clr(fw_clr),
    .a(fw_a), .w(fw_w), .acc(fw_acc)
  );

  fased_vw #(.A_W(A_W), .ACC_W(ACC_W)) u_vw (
    .clk(clk), .rst_n(rst_n), .en(vw_en), .clr(vw_clr), .mode(vw_mode),
    .a(vw_a), .w(vw_w), .acc(vw_acc)
  );

endmodule
