// gps_64_8_v: cryptoGPS-64/8-V, the round-based tag core whose secret s is
// loaded through the pins instead of being hard-wired.
//
// Same architecture and timing as cryptoGPS-64/8-F (present_rb,
// gps_ctrl_rb, addwc) with s_storage_var in place of the fixed storage:
// 160 flip-flops written from data_in. Protocol per run: 8 IV bytes, 5
// challenge bytes and 20 bytes of s (least significant first) in; 136 y
// bytes and 8 bytes of the next IV out. Pins as in the fixed variant.
// KEY is a placeholder value of this design.
module gps_64_8_v
  import gps_pkg::*;
#(
  parameter logic [79:0] KEY = 80'hFEDC_BA98_7654_3210_0F1E
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
  logic       overflow, en_add, add_clr, s_we;

  present_rb #(.KEY(KEY)) u_present (
    .clk, .rst_n(n_reset), .ctrl(control_ps), .iv_in(data_in),
    .round, .ps_out
  );

  gps_ctrl_rb #(.VAR_S(1'b1)) u_ctrl (
    .clk, .rst_n(n_reset), .rx, .tx, .data_in,
    .ps_ctrl(control_ps), .round, .s_ctrl(control_s), .overflow,
    .s_we, .en_add, .add_clr
  );

  s_storage_var u_s_storage (
    .clk, .rst_n(n_reset), .ctrl(control_s), .s_in(data_in), .s_we,
    .overflow, .s_out
  );

  addwc #(.N(8)) u_addwc (
    .clk, .rst_n(n_reset), .r(ps_out), .s(s_out), .en_add, .clr(add_clr),
    .rs(data_out)
  );
endmodule
