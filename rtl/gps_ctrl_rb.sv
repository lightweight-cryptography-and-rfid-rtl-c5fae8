// gps_ctrl_rb: controller of the round-based cryptoGPS variants
// (64-bit PRESENT datapath, 8-bit I/O and addition).
//
// Four interacting parts: the I/O FSM (gps_io_hs), the S_Storage FSM
// (lhw_decoder), the PRESENT sequencing and the central FSM below.
// One run of the central FSM:
//   LOAD_IV  8 transfers, the IV bytes (LSB first) into the PRESENT state;
//   LOAD_C   5 transfers, the compact challenge n0..n4;
//   LOAD_S   20 transfers of s (LSB first), only when VAR_S = 1;
//   PREP     1 cycle: PRG key reload, carry clear, challenge decoder start;
//   then 17 times: ROUND (31 cycles) and FINAL (1 cycle) encrypt the next
//   OFB block (32 cycles), OUT sends its 8 bytes, each byte
//   y_j = r_j + (s*c)_j + carry from Addwc, advancing PRESENT, carry,
//   S_Storage and decoder when the transfer completes;
//   FLUSH    1 cycle: clears the carry and the S_Storage overflow register;
//   IV_OUT   8 transfers of the last ciphertext block, the IV of the next
//   run; then back to LOAD_IV.
// With a microcontroller that keeps up, tx drops after the last byte of a
// block and rises for the first byte of the next one 33 cycles later
// (32 compute cycles and one handshake cycle).
// Outputs ps_ctrl (control_ps), s_ctrl (control_s), s_we (write strobe of
// the loadable secret), en_add/add_clr (Addwc). The phase order, the 32
// cycles per block and the IV output at the end follow the document; the
// transfer order and the single prep and flush cycles are this design's.
module gps_ctrl_rb
  import gps_pkg::*;
#(
  parameter bit VAR_S = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  input  logic [7:0] data_in,
  output ps_ctrl_t   ps_ctrl,
  input  logic [4:0] round,
  output s_ctrl_t    s_ctrl,
  input  logic       overflow,
  output logic       s_we,
  output logic       en_add,
  output logic       add_clr
);
  typedef enum logic [3:0] {
    ST_LOAD_IV, ST_LOAD_C, ST_LOAD_S, ST_PREP, ST_ROUND, ST_FINAL,
    ST_OUT, ST_FLUSH, ST_IV_OUT
  } ctrl_state_e;

  ctrl_state_e state_q;
  logic [4:0]  cnt_q;
  logic [4:0]  blk_q;
  logic [7:0]  byte_q;

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
    .byte_idx(byte_q), .overflow,
    .n_zero(dec_nz), .c2(dec_c2), .sel(dec_sel)
  );

  always_comb begin
    ready    = 1'b0;
    ps_ctrl  = '{op: PS_NOP, add_key: 1'b0};
    s_ctrl   = '{step: 1'b0, n_zero: 1'b0, c2: dec_c2, sel: dec_sel};
    s_we     = 1'b0;
    en_add   = 1'b0;
    add_clr  = 1'b0;
    c_load   = 1'b0;
    dec_init = 1'b0;
    dec_step = 1'b0;
    unique case (state_q)
      ST_LOAD_IV: begin
        ready = 1'b1;
        if (xfer) ps_ctrl.op = PS_LOAD_IV;
      end
      ST_LOAD_C: begin
        ready  = 1'b1;
        c_load = xfer;
      end
      ST_LOAD_S: begin
        ready      = 1'b1;
        s_ctrl.sel = cnt_q;
        s_we       = xfer;
      end
      ST_PREP: begin
        ps_ctrl.op = PS_KEY_INIT;
        en_add     = 1'b1;
        add_clr    = 1'b1;
        dec_init   = 1'b1;
      end
      ST_ROUND: ps_ctrl.op = PS_ROUND;
      ST_FINAL: ps_ctrl.op = PS_FINAL;
      ST_OUT: begin
        ready         = 1'b1;
        s_ctrl.n_zero = dec_nz;
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
      ST_IV_OUT: begin
        ready = 1'b1;
        if (done) ps_ctrl.op = PS_ROTATE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_LOAD_IV;
      cnt_q   <= '0;
      blk_q   <= '0;
      byte_q  <= '0;
    end else begin
      unique case (state_q)
        ST_LOAD_IV: if (xfer) begin
          cnt_q <= (cnt_q == 5'd7) ? 5'd0 : cnt_q + 5'd1;
          if (cnt_q == 5'd7) state_q <= ST_LOAD_C;
        end
        ST_LOAD_C: if (xfer) begin
          cnt_q <= (cnt_q == 5'(C_BYTES - 1)) ? 5'd0 : cnt_q + 5'd1;
          if (cnt_q == 5'(C_BYTES - 1)) state_q <= VAR_S ? ST_LOAD_S : ST_PREP;
        end
        ST_LOAD_S: if (xfer) begin
          cnt_q <= (cnt_q == 5'(S_BYTES - 1)) ? 5'd0 : cnt_q + 5'd1;
          if (cnt_q == 5'(S_BYTES - 1)) state_q <= ST_PREP;
        end
        ST_PREP: begin
          blk_q   <= '0;
          byte_q  <= '0;
          cnt_q   <= '0;
          state_q <= ST_ROUND;
        end
        ST_ROUND: if (round == 5'(N_ROUNDS)) state_q <= ST_FINAL;
        ST_FINAL: state_q <= ST_OUT;
        ST_OUT: if (done) begin
          byte_q <= byte_q + 8'd1;
          cnt_q  <= (cnt_q == 5'd7) ? 5'd0 : cnt_q + 5'd1;
          if (cnt_q == 5'd7) begin
            if (blk_q == 5'(N_BLOCKS - 1)) state_q <= ST_FLUSH;
            else begin
              blk_q   <= blk_q + 5'd1;
              state_q <= ST_ROUND;
            end
          end
        end
        ST_FLUSH: begin
          cnt_q   <= '0;
          state_q <= ST_IV_OUT;
        end
        ST_IV_OUT: if (done) begin
          cnt_q <= (cnt_q == 5'd7) ? 5'd0 : cnt_q + 5'd1;
          if (cnt_q == 5'd7) state_q <= ST_LOAD_IV;
        end
        default: state_q <= ST_LOAD_IV;
      endcase
    end
  end
endmodule
