// gps_asic_top: the three cryptoGPS tag cores of the prototype ASIC side by
// side: cryptoGPS-64/8-F (round-based, fixed secret), cryptoGPS-64/8-V
// (round-based, loadable secret) and cryptoGPS-4/4-F (serialized, fixed
// secret). Each core keeps its own set of the 20 signal pins (clk,
// n_reset, rx, tx, data_in[7:0], data_out[7:0]), prefixed f8_, v8_ and
// f4_; they share no logic. Placing all three variants on one die with the
// same pin set follows the document; pads, supplies and package are not
// part of this RTL.
module gps_asic_top
  import gps_pkg::*;
#(
  parameter logic [79:0]      KEY      = 80'hFEDC_BA98_7654_3210_0F1E,
  parameter logic [SIGMA-1:0] S_SECRET =
    160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59
) (
  input  logic       f8_clk,
  input  logic       f8_n_reset,
  input  logic       f8_rx,
  output logic       f8_tx,
  input  logic [7:0] f8_data_in,
  output logic [7:0] f8_data_out,

  input  logic       v8_clk,
  input  logic       v8_n_reset,
  input  logic       v8_rx,
  output logic       v8_tx,
  input  logic [7:0] v8_data_in,
  output logic [7:0] v8_data_out,

  input  logic       f4_clk,
  input  logic       f4_n_reset,
  input  logic       f4_rx,
  output logic       f4_tx,
  input  logic [7:0] f4_data_in,
  output logic [7:0] f4_data_out
);
  gps_64_8_f #(.KEY(KEY), .S_SECRET(S_SECRET)) u_gps_64_8_f (
    .clk(f8_clk), .n_reset(f8_n_reset), .rx(f8_rx), .tx(f8_tx),
    .data_in(f8_data_in), .data_out(f8_data_out)
  );

  gps_64_8_v #(.KEY(KEY)) u_gps_64_8_v (
    .clk(v8_clk), .n_reset(v8_n_reset), .rx(v8_rx), .tx(v8_tx),
    .data_in(v8_data_in), .data_out(v8_data_out)
  );

  gps_4_4_f #(.KEY(KEY), .S_SECRET(S_SECRET)) u_gps_4_4_f (
    .clk(f4_clk), .n_reset(f4_n_reset), .rx(f4_rx), .tx(f4_tx),
    .data_in(f4_data_in), .data_out(f4_data_out)
  );
endmodule
