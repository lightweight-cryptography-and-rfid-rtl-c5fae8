// s_storage_fix4: fixed-secret storage for the serialized variant with a
// 4-bit datapath.
//
// The byte path is that of the 8-bit fixed storage (20-to-1 chunk MUX, AND
// with n_zero, shift of {8'h00, a} left by c2, OR with the gated overflow
// register gReg-8). A one-bit nibble counter then picks the low nibble of
// that byte (counter 0) or the high nibble (counter 1) for s_out. Every
// ctrl.step toggles the counter; gReg-8 is loaded only on the step that
// leaves the high nibble, so each byte of the stream is held for two steps.
// overflow flags the last nibble of a copy (sel = 19, n_zero set, counter 1).
// Timing: s_out is combinational; counter and gReg-8 update on the clock
// edge with ctrl.step high. Splitting the byte into two nibbles under a
// counter follows the document; the rest is carried over from the 8-bit
// storage, with S_SECRET chosen by this design.
module s_storage_fix4
  import gps_pkg::*;
#(
  parameter logic [SIGMA-1:0] S_SECRET =
    160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59
) (
  input  logic       clk,
  input  logic       rst_n,
  input  s_ctrl_t    ctrl,
  output logic       overflow,
  output logic [3:0] s_out
);
  logic [7:0]  chunk;
  logic [7:0]  a;
  logic [15:0] b;
  logic [7:0]  byte_out;
  logic [7:0]  greg_q;
  logic        nib_q;

  always_comb begin
    chunk    = (ctrl.sel < 5'(S_BYTES)) ? S_SECRET[8*ctrl.sel +: 8] : 8'h00;
    a        = chunk & {8{ctrl.n_zero}};
    b        = {8'h00, a} << ctrl.c2;
    byte_out = b[7:0] | greg_q;
    s_out    = nib_q ? byte_out[7:4] : byte_out[3:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      greg_q <= '0;
      nib_q  <= 1'b0;
    end else if (ctrl.step) begin
      nib_q <= ~nib_q;
      if (nib_q) greg_q <= b[15:8];
    end
  end

  assign overflow = ctrl.n_zero && nib_q && (ctrl.sel == 5'(S_BYTES - 1));
endmodule
