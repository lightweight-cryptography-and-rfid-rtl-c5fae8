// lhw_decoder: decodes the compact low-Hamming-weight challenge and drives
// the S_Storage control while the response is streamed out.
//
// The challenge arrives as five bytes n0..n4 (n0 first), each split as
// n_i = c_i2 (3 bits, n_i[7:5]) || c_i1 (5 bits, n_i[4:0]). The five
// non-zero bits of the 848-bit challenge c lie at
//   P_0 = 8*c_01 + c_02,   P_i = P_(i-1) + 160 + 8*c_i1 + c_i2  (i = 1..4),
// so consecutive ones are at least 160 bits apart and s*c is the sum of five
// non-overlapping copies of s shifted to P_0..P_4. While byte byte_idx of
// the response is produced, the decoder compares it with P_i / 8 of the
// current copy: inside the copy it sets n_zero, sel = byte_idx - P_i/8 and
// c2 = P_i mod 8; at the last chunk (overflow from the storage) the step
// input moves it to the next copy, adding 160 + 8*c_i1 + c_i2 to the
// position. After the fifth copy n_zero stays low.
// Interface: c_load shifts c_byte into the challenge register; init starts
// decoding from P_0; step marks the end of a response chunk. Outputs are
// combinational from the registers and byte_idx.
// The encoding and the worked positions follow the document (its two
// examples give P = 0,160,320,480,640 and 1,175,356,547,741, i.e. the
// positions accumulate); splitting this logic out of the controller is this
// design's choice. Positions beyond the 1088-bit response are truncated.
module lhw_decoder
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       c_load,
  input  logic [7:0] c_byte,
  input  logic       init,
  input  logic       step,
  input  logic [7:0] byte_idx,
  input  logic       overflow,
  output logic       n_zero,
  output logic [2:0] c2,
  output logic [4:0] sel
);
  logic [8*C_BYTES-1:0] c_q;
  logic [POS_W-1:0]     pos_q;
  logic [2:0]           copy_q;
  logic [7:0]           base;
  logic [7:0]           offs;
  logic [7:0]           n_next;

  assign base   = pos_q[POS_W-1:3];
  assign offs   = byte_idx - base;
  assign n_next = c_q[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q    <= '0;
      pos_q  <= '0;
      copy_q <= 3'(C_BYTES);
    end else if (c_load) begin
      c_q <= {c_byte, c_q[8*C_BYTES-1:8]};
    end else if (init) begin
      pos_q  <= POS_W'({c_q[4:0], c_q[7:5]});
      copy_q <= '0;
    end else if (step && overflow && copy_q < 3'(C_BYTES)) begin
      c_q    <= {8'h00, c_q[8*C_BYTES-1:8]};
      pos_q  <= pos_q + POS_W'(SIGMA) + POS_W'({n_next[4:0], n_next[7:5]});
      copy_q <= copy_q + 3'd1;
    end
  end

  assign n_zero = (copy_q < 3'(C_BYTES)) && (byte_idx >= base) && (offs < 8'(S_BYTES));
  assign sel    = offs[4:0];
  assign c2     = pos_q[2:0];
endmodule
