// gps_4_4_f: cryptoGPS-4/4-F, the serialized tag core with a fixed secret
// and a 4-bit internal datapath.
//
// Computes the same response y = r + s*c as the round-based variants, with
// present_ser (PRESENT-80/4, one S-box per cycle, 527 cycles per 64-bit
// block), gps_ctrl_ser, s_storage_fix4 and a 4-bit addwc. The IV enters
// through data_in[3:0]; data_out carries "0000" in its upper half and the
// 4-bit sum in its lower half, as on the document's diagram.
// Protocol per run: 16 IV nibbles and 5 challenge bytes in; 272 y nibbles
// (least significant first) and 16 nibbles of the next IV out.
// Pins as in the round-based variants. KEY and S_SECRET are placeholders.
module gps_4_4_f
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
  logic [3:0] ps_out, s_out, rs;
  logic       overflow, en_add, add_clr;

  present_ser #(.KEY(KEY)) u_present (
    .clk, .rst_n(n_reset), .ctrl(control_ps), .iv_in(data_in[3:0]),
    .round, .ps_out
  );

  gps_ctrl_ser u_ctrl (
    .clk, .rst_n(n_reset), .rx, .tx, .data_in,
    .ps_ctrl(control_ps), .round, .s_ctrl(control_s), .overflow,
    .en_add, .add_clr
  );

  s_storage_fix4 #(.S_SECRET(S_SECRET)) u_s_storage (
    .clk, .rst_n(n_reset), .ctrl(control_s), .overflow, .s_out
  );

  addwc #(.N(4)) u_addwc (
    .clk, .rst_n(n_reset), .r(ps_out), .s(s_out), .en_add, .clr(add_clr),
    .rs
  );

  assign data_out = {4'b0000, rs};
endmodule
