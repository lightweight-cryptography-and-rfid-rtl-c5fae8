// s_storage_var: storage of a loadable 160-bit secret s for the variant
// with a variable secret, emitting s as a byte stream shifted to an
// arbitrary bit offset.
//
// s is held in 20 byte registers (160 flip-flops) written through s_in at
// chunk ctrl.sel when s_we is high, one byte per load (chunk 0 = s[7:0]).
// The read path is the same as in the fixed-secret storage: chunk MUX, AND
// with n_zero, shift of {8'h00, a} left by c2, low byte ORed with the gated
// overflow register gReg-8, high byte loaded into gReg-8 on ctrl.step.
// overflow flags the last chunk of a copy (sel = 19 with n_zero set).
// Timing: s_out is combinational; the s registers and gReg-8 update on the
// clock edge. The 160 extra flip-flops follow the document; the separate
// s_we strobe and the byte order are this design's choices. The s
// registers have no reset: s must be loaded before it is used.
module s_storage_var
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  s_ctrl_t    ctrl,
  input  logic [7:0] s_in,
  input  logic       s_we,
  output logic       overflow,
  output logic [7:0] s_out
);
  logic [7:0]  s_mem [S_BYTES];
  logic [7:0]  chunk;
  logic [7:0]  a;
  logic [15:0] b;
  logic [7:0]  greg_q;

  always_ff @(posedge clk) begin
    if (s_we && ctrl.sel < 5'(S_BYTES)) s_mem[ctrl.sel] <= s_in;
  end

  always_comb begin
    chunk = (ctrl.sel < 5'(S_BYTES)) ? s_mem[ctrl.sel] : 8'h00;
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
