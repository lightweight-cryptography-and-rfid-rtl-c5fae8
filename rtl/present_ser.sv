// present_ser: serialized PRESENT-80 core with a 4-bit datapath, the PRG of
// the cryptoGPS-4/4-F variant (OFB mode).
//
// The state is a 16-nibble rotating register. The IV enters one nibble per
// PS_LOAD_IV (least significant nibble first). A round is 16 PS_SBOX cycles
// followed by one PS_PLAYER_KS cycle: each PS_SBOX cycle XORs the lowest
// state nibble with the matching round-key nibble, passes it through the
// single S-box and rotates state and round key right by one nibble; after
// 16 cycles both are back in place and PS_PLAYER_KS applies the bit
// permutation (wiring only) and the key schedule. 31 rounds take 527 cycles.
// The last key addition is done on the way out: PS_ROTATE with add_key = 1
// returns state[3:0] ^ roundkey[3:0] on ps_out and rotates it back into the
// state, so after 16 such steps the state holds the ciphertext, which is the
// next OFB input. PS_ROTATE with add_key = 0 reads the state unchanged.
// Interface: ctrl (control_ps, 5 bits), iv_in (4 bits), round (5 bits,
// current round 1..31), ps_out (4 bits). Serialization and the 4-bit
// datapath follow the document; the nibble order, the merging of the last
// key addition into the output pass and the key value are this design's.
module present_ser
  import gps_pkg::*;
#(
  parameter logic [79:0] KEY = 80'hFEDC_BA98_7654_3210_0F1E
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ps_ctrl_t   ctrl,
  input  logic [3:0] iv_in,
  output logic [4:0] round,
  output logic [3:0] ps_out
);
  logic [63:0] state_q;
  logic [79:0] key_q;
  logic [4:0]  rnd_q;
  logic [3:0]  out_nib;

  assign out_nib = state_q[3:0] ^ (ctrl.add_key ? key_q[19:16] : 4'h0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= KEY;
      rnd_q   <= 5'd1;
    end else begin
      unique case (ctrl.op)
        PS_LOAD_IV:  state_q <= {iv_in, state_q[63:4]};
        PS_KEY_INIT: begin
          key_q <= KEY;
          rnd_q <= 5'd1;
        end
        PS_SBOX: begin
          state_q       <= {sbox(state_q[3:0] ^ key_q[19:16]), state_q[63:4]};
          key_q[79:16]  <= {key_q[19:16], key_q[79:20]};
        end
        PS_PLAYER_KS: begin
          state_q <= player(state_q);
          key_q   <= key_update(key_q, rnd_q);
          rnd_q   <= rnd_q + 5'd1;
        end
        PS_ROTATE: begin
          state_q <= {out_nib, state_q[63:4]};
          if (ctrl.add_key) key_q[79:16] <= {key_q[19:16], key_q[79:20]};
        end
        default: ;
      endcase
    end
  end

  assign round  = rnd_q;
  assign ps_out = out_nib;
endmodule
