// gps_64_8_f: cryptoGPS-64/8-F, the round-based tag core with a fixed
// secret. It answers a compact low-Hamming-weight challenge c with the
// 1088-bit response y = r + s*c of the cryptoGPS identification scheme
// (coupon variant: no elliptic-curve or hash operation on the tag).
//
// r is regenerated from a 64-bit IV by PRESENT-80 in output-feedback mode
// (17 blocks, PRG key KEY); s (S_SECRET, 160 bits) is hard-wired; s*c is
// five shifted copies of s, so the multiplication becomes a byte-serial
// addition done by Addwc while y leaves the chip. Blocks: present_rb
// (PRESENT-80/64), gps_ctrl_rb (Controller), s_storage_fix (S_Storage),
// addwc (8-bit Addwc), wired as in the document's top-level diagram.
// Pins (20): clk, n_reset (asynchronous, active low), rx/tx handshake,
// data_in[7:0], data_out[7:0]. Protocol per run: 8 IV bytes, 5 challenge
// bytes in; 136 y bytes (least significant first) and the 8 bytes of the
// next IV out, each transfer a four-phase rx/tx handshake. 32 cycles
// compute each 64-bit block. KEY and S_SECRET values are placeholders of
// this design.
module gps_64_8_f
  import gps_pkg::*;
#(
  parameter logic [79:0]      KEY      = 80'hFEDC_BA98_7654_3210_0F1E,
  parameter logic [SIGMA-1:0] S_SECRET =
    160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59
) (
  input  logic       clk,
  input  logic       n_reset,
  input  logic       rx,
  output logic       tx,
  input  logic [7:0] data_in,
  output logic [7:0] data_out
);
  ps_ctrl_t   control_ps;
  s_ctrl_t    control_s;
  logic [4:0] round;
  logic [7:0] ps_out, s_out;
  logic       overflow, en_add, add_clr;
  logic       s_we_unused;

  present_rb #(.KEY(KEY)) u_present (
    .clk, .rst_n(n_reset), .ctrl(control_ps), .iv_in(data_in),
    .round, .ps_out
  );

  gps_ctrl_rb #(.VAR_S(1'b0)) u_ctrl (
    .clk, .rst_n(n_reset), .rx, .tx, .data_in,
    .ps_ctrl(control_ps), .round, .s_ctrl(control_s), .overflow,
    .s_we(s_we_unused), .en_add, .add_clr
  );

  s_storage_fix #(.S_SECRET(S_SECRET)) u_s_storage (
    .clk, .rst_n(n_reset), .ctrl(control_s), .overflow, .s_out
  );

  addwc #(.N(8)) u_addwc (
    .clk, .rst_n(n_reset), .r(ps_out), .s(s_out), .en_add, .clr(add_clr),
    .rs(data_out)
  );
endmodule
