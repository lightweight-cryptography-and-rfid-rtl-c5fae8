// tb_s_storage_fix4: checks s_storage_fix4 alone.
// Plays the role of the challenge decoder: streams two copies of s at bit
// positions P1 and P2 >= P1 + 160 (P2 sometimes in the very byte where the
// first copy ends, so the overflow register is ORed into the next copy),
// driving n_zero, sel and c2 chunk by chunk, and compares every output
// chunk with the bits of (s << P1) | (s << P2). Also checks the overflow
// flag on each chunk.
module tb_s_storage_fix4;
  import gps_pkg::*;

  localparam logic [159:0] S_F = 160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59;
  localparam int CW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  s_ctrl_t ctrl;
  logic overflow;
  logic [CW-1:0] s_out;
  logic [7:0] s_in;
  logic s_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s_storage_fix4 #(.S_SECRET(S_F)) dut (.clk, .rst_n, .ctrl, .overflow, .s_out);

  initial begin
    logic [159:0] s;
    logic [511:0] exp;
    int p [2];
    int nb, q, active, off;
    ctrl = '0; s_in = '0; s_we = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      s = S_F;

      p[0] = $urandom_range(80, 0);
      p[1] = p[0] + 160 + ((t % 3 == 0) ? $urandom_range(7 - p[0] % 8, 0) : $urandom_range(100, 0));
      exp = ({352'h0, s} << p[0]) | ({352'h0, s} << p[1]);
      nb = p[1] / 8 + 22;
      q = 0;
      for (int g = 0; g < nb; g++) begin
        off = g - p[q] / 8;
        active = (q < 2) && off >= 0 && off < 20;
        ctrl.n_zero = 1'(active);
        ctrl.sel = active ? 5'(off) : 5'd0;
        ctrl.c2 = 3'(p[(q < 2) ? q : 1] % 8);
        for (int h = 0; h < 8 / CW; h++) begin
          ctrl.step = 1'b0;
          #1;
          checks++;
          if (s_out !== exp[8*g + CW*h +: CW]) begin
            failures++;
            if (failures < 10) $display("FAIL trial %0d chunk %0d.%0d: got %h exp %h", t, g, h, s_out, exp[8*g + CW*h +: CW]);
          end
          checks++;
          if (overflow !== (active && off == 19 && h == 8 / CW - 1)) begin
            failures++;
            if (failures < 10) $display("FAIL overflow trial %0d chunk %0d", t, g);
          end
          ctrl.step = 1'b1;
          @(posedge clk); #1;
          ctrl.step = 1'b0;
        end
        if (active && off == 19) q++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
