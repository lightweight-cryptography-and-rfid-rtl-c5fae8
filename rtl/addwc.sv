// addwc: n-bit adder with a stored carry, for chunk-serial long additions.
//
// rs = r + s + carry is combinational. The carry flip-flop (gated by en_add)
// takes the adder's carry out, or 0 when clr is set, so a long number is
// added least significant chunk first, one chunk per en_add pulse.
// Structure (ripple adder, 2:1 carry mux with constant '0', gated carry
// flip-flop, n = 4 or 8) follows the block diagram; the separate clr input
// that drives the mux select is this design's choice.
// Timing: rs is valid in the same cycle as r and s; the carry is updated at
// the clock edge where en_add is high.
module addwc #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] r,
  input  logic [N-1:0] s,
  input  logic         en_add,
  input  logic         clr,
  output logic [N-1:0] rs
);
  logic         carry_q;
  logic         cout;

  always_comb {cout, rs} = {1'b0, r} + {1'b0, s} + {{N{1'b0}}, carry_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      carry_q <= 1'b0;
    else if (en_add) carry_q <= clr ? 1'b0 : cout;
  end
endmodule
