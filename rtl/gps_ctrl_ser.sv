// gps_ctrl_ser: controller of the serialized cryptoGPS-4/4-F variant
// (4-bit PRESENT datapath, 4-bit addition, fixed secret).
//
// Built from the same I/O FSM (gps_io_hs) and S_Storage FSM (lhw_decoder)
// as the round-based controller, with the serialized PRESENT FSM whose
// states carry the names of the document's state diagram:
//   INIT_IV    16 transfers, one IV nibble each on data_in[3:0] (LSB first);
//   LOAD_C     5 transfers, the compact challenge bytes n0..n4;
//   PREP       1 cycle: carry clear, challenge decoder start;
//   then 17 times (msg = 0..16): INIT_KEY (1 cycle, key reload), 31 rounds
//   of SBOX (16 cycles, counter 'serial') and PLAYER_KS (1 cycle), i.e.
//   527 cycles, and ADD: 16 transfers of y nibbles, each one the
//   ciphertext nibble (last round key added on the fly) plus the s*c nibble
//   plus carry;
//   FLUSH      2 cycles: clear carry and the storage overflow register;
//   IV_OUTPUT  16 transfers of the last ciphertext block; back to INIT_IV.
// With a microcontroller that keeps up, tx drops after the last nibble of
// a block and rises for the next block 529 cycles later (1 + 527 + 1).
// The state names, the 16-cycle S-box pass per round and the 527 cycles
// per block follow the document; the document's two key-initialisation
// states are merged into one here, and the nibble transfer order, prep and
// flush cycles are this design's.
module gps_ctrl_ser
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  input  logic [7:0] data_in,
  output ps_ctrl_t   ps_ctrl,
  input  logic [4:0] round,
  output s_ctrl_t    s_ctrl,
  input  logic       overflow,
  output logic       en_add,
  output logic       add_clr
);
  typedef enum logic [3:0] {
    ST_INIT_IV, ST_LOAD_C, ST_PREP, ST_INIT_KEY, ST_SBOX, ST_PLAYER_KS,
    ST_ADD, ST_FLUSH, ST_IV_OUTPUT
  } ctrl_state_e;

  ctrl_state_e state_q;
  logic [3:0]  serial_q;
  logic [4:0]  msg_q;
  logic [8:0]  nib_q;

  logic ready, xfer, done;
  logic c_load, dec_init, dec_step;
  logic dec_nz;
  logic [2:0] dec_c2;
  logic [4:0] dec_sel;

  gps_io_hs u_io (
    .clk, .rst_n, .rx, .ready, .tx, .xfer, .done
  );

  lhw_decoder u_dec (
    .clk, .rst_n,
    .c_load, .c_byte(data_in),
    .init(dec_init), .step(dec_step),
    .byte_idx(nib_q[8:1]), .overflow,
    .n_zero(dec_nz), .c2(dec_c2), .sel(dec_sel)
  );

  always_comb begin
    ready    = 1'b0;
    ps_ctrl  = '{op: PS_NOP, add_key: 1'b0};
    s_ctrl   = '{step: 1'b0, n_zero: 1'b0, c2: dec_c2, sel: dec_sel};
    en_add   = 1'b0;
    add_clr  = 1'b0;
    c_load   = 1'b0;
    dec_init = 1'b0;
    dec_step = 1'b0;
    unique case (state_q)
      ST_INIT_IV: begin
        ready = 1'b1;
        if (xfer) ps_ctrl.op = PS_LOAD_IV;
      end
      ST_LOAD_C: begin
        ready  = 1'b1;
        c_load = xfer;
      end
      ST_PREP: begin
        en_add   = 1'b1;
        add_clr  = 1'b1;
        dec_init = 1'b1;
      end
      ST_INIT_KEY:  ps_ctrl.op = PS_KEY_INIT;
      ST_SBOX:      ps_ctrl.op = PS_SBOX;
      ST_PLAYER_KS: ps_ctrl.op = PS_PLAYER_KS;
      ST_ADD: begin
        ready           = 1'b1;
        ps_ctrl.add_key = 1'b1;
        s_ctrl.n_zero   = dec_nz;
        if (done) begin
          ps_ctrl.op  = PS_ROTATE;
          en_add      = 1'b1;
          s_ctrl.step = 1'b1;
          dec_step    = 1'b1;
        end
      end
      ST_FLUSH: begin
        s_ctrl.step = 1'b1;
        en_add      = 1'b1;
        add_clr     = 1'b1;
      end
      ST_IV_OUTPUT: begin
        ready = 1'b1;
        if (done) ps_ctrl.op = PS_ROTATE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_INIT_IV;
      serial_q <= '0;
      msg_q    <= '0;
      nib_q    <= '0;
    end else begin
      unique case (state_q)
        ST_INIT_IV: if (xfer) begin
          serial_q <= serial_q + 4'd1;
          if (serial_q == 4'd15) state_q <= ST_LOAD_C;
        end
        ST_LOAD_C: if (xfer) begin
          serial_q <= (serial_q == 4'(C_BYTES - 1)) ? 4'd0 : serial_q + 4'd1;
          if (serial_q == 4'(C_BYTES - 1)) state_q <= ST_PREP;
        end
        ST_PREP: begin
          msg_q    <= '0;
          nib_q    <= '0;
          serial_q <= '0;
          state_q  <= ST_INIT_KEY;
        end
        ST_INIT_KEY: begin
          serial_q <= '0;
          state_q  <= ST_SBOX;
        end
        ST_SBOX: begin
          serial_q <= serial_q + 4'd1;
          if (serial_q == 4'd15) state_q <= ST_PLAYER_KS;
        end
        ST_PLAYER_KS: state_q <= (round == 5'(N_ROUNDS)) ? ST_ADD : ST_SBOX;
        ST_ADD: if (done) begin
          nib_q    <= nib_q + 9'd1;
          serial_q <= serial_q + 4'd1;
          if (serial_q == 4'd15) begin
            if (msg_q == 5'(N_BLOCKS - 1)) state_q <= ST_FLUSH;
            else begin
              msg_q   <= msg_q + 5'd1;
              state_q <= ST_INIT_KEY;
            end
          end
        end
        ST_FLUSH: begin
          serial_q <= serial_q + 4'd1;
          if (serial_q == 4'd1) begin
            serial_q <= '0;
            state_q  <= ST_IV_OUTPUT;
          end
        end
        ST_IV_OUTPUT: if (done) begin
          serial_q <= serial_q + 4'd1;
          if (serial_q == 4'd15) state_q <= ST_INIT_IV;
        end
        default: state_q <= ST_INIT_IV;
      endcase
    end
  end
endmodule
