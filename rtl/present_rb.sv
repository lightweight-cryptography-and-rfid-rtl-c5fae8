// present_rb: round-based PRESENT-80 core (64-bit datapath) used as the
// keyed pseudo-random generator of cryptoGPS in output-feedback mode.
//
// The 64-bit state register is loaded with the IV one byte at a time
// (least significant byte first), then encrypted with the hard-wired 80-bit
// PRG key KEY: 31 PS_ROUND cycles (key add, S-box layer, bit permutation,
// key schedule) and one PS_FINAL cycle (last key add, key reload), so one
// 64-bit block takes 32 cycles. The ciphertext stays in the state register
// and is read through ps_out = state[7:0]; PS_ROTATE rotates the state
// right by one byte, so after eight rotations the ciphertext is back in
// place and serves as the plaintext of the next OFB block.
// Interface: ctrl (control_ps, 5 bits) from the controller, iv_in (8 bits),
// round (5 bits, number of the round the next PS_ROUND performs, 0 after
// round 31), ps_out (8 bits). The add_key bit of control_ps is only used
// by the serialized core and is ignored here. The round-based architecture, the OFB use,
// the 8-bit IV input and 8-bit output follow the document; the byte order,
// the control encoding and the key value are this design's choices.
module present_rb
  import gps_pkg::*;
#(
  parameter logic [79:0] KEY = 80'hFEDC_BA98_7654_3210_0F1E
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ps_ctrl_t ctrl,
  input  logic [7:0] iv_in,
  output logic [4:0] round,
  output logic [7:0] ps_out
);
  logic [63:0] state_q;
  logic [79:0] key_q;
  logic [4:0]  rnd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= KEY;
      rnd_q   <= 5'd1;
    end else begin
      unique case (ctrl.op)
        PS_LOAD_IV:  state_q <= {iv_in, state_q[63:8]};
        PS_KEY_INIT: begin
          key_q <= KEY;
          rnd_q <= 5'd1;
        end
        PS_ROUND: begin
          state_q <= player(sbox_layer(state_q ^ key_q[79:16]));
          key_q   <= key_update(key_q, rnd_q);
          rnd_q   <= rnd_q + 5'd1;   // 31 wraps to 0
        end
        PS_FINAL: begin
          state_q <= state_q ^ key_q[79:16];
          key_q   <= KEY;
          rnd_q   <= 5'd1;
        end
        PS_ROTATE:   state_q <= {state_q[7:0], state_q[63:8]};
        default: ;
      endcase
    end
  end

  assign round  = rnd_q;
  assign ps_out = state_q[7:0];
endmodule
