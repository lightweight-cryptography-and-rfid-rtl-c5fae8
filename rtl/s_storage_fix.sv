// s_storage_fix: holds the fixed 160-bit secret s and emits it as a byte
// stream shifted to an arbitrary bit offset, for the round-based variant
// with a hard-wired secret.
//
// Datapath (per the block diagram): a 20-to-1 byte MUX picks chunk sel of s
// (chunk 0 = s[7:0]); an AND with n_zero (one control bit repeated eight
// times) forces the chunk to zero outside a copy of s; the 16-bit value
// {8'h00, a} is shifted left by c2 (0..7); its low byte d is ORed with the
// gated register gReg-8 to form s_out, and its high byte c is loaded into
// gReg-8 on ctrl.step, so the bits pushed out of one byte appear in the next.
// Because the register is ORed in, the tail of one copy of s and the head
// of the next can share a byte.
// overflow flags the last chunk (sel = 19 with n_zero set) so the
// controller can move on to the next copy of s.
// Timing: s_out is combinational from ctrl and gReg; gReg updates on the
// clock edge with ctrl.step high. The 10-bit control word and the overflow
// line are on the block diagram; their field split and the meaning given to
// overflow are this design's choices, as is the value of S_SECRET.
module s_storage_fix
  import gps_pkg::*;
#(
  parameter logic [SIGMA-1:0] S_SECRET =
    160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59
) (
  input  logic       clk,
  input  logic       rst_n,
  input  s_ctrl_t    ctrl,
  output logic       overflow,
  output logic [7:0] s_out
);
  logic [7:0]  chunk;
  logic [7:0]  a;
  logic [15:0] b;
  logic [7:0]  greg_q;

  always_comb begin
    chunk = (ctrl.sel < 5'(S_BYTES)) ? S_SECRET[8*ctrl.sel +: 8] : 8'h00;
    a     = chunk & {8{ctrl.n_zero}};
    b     = {8'h00, a} << ctrl.c2;
    s_out = b[7:0] | greg_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         greg_q <= '0;
    else if (ctrl.step) greg_q <= b[15:8];
  end

  assign overflow = ctrl.n_zero && (ctrl.sel == 5'(S_BYTES - 1));
endmodule
