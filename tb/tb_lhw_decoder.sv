// tb_lhw_decoder: checks the decoding of the compact challenge.
// First checks the golden positions against the two worked examples of the
// encoding (bytes 00 00 00 00 00 -> 0,160,320,480,640 and bytes
// 44 E3 A2 C1 20 -> 1,175,356,547,741). Then, for those and random
// challenges, loads the five bytes, starts decoding and walks the 136
// response bytes, feeding back overflow as the storage does, and compares
// n_zero, sel and c2 of every byte with the golden positions.
module tb_lhw_decoder;
  import gps_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c_load = 1'b0, init = 1'b0, step = 1'b0;
  logic [7:0] c_byte = '0, byte_idx = '0;
  logic overflow;
  logic n_zero;
  logic [2:0] c2;
  logic [4:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lhw_decoder dut (.clk, .rst_n, .c_load, .c_byte, .init, .step, .byte_idx, .overflow,
                   .n_zero, .c2, .sel);

  assign overflow = n_zero && sel == 5'd19;

  task automatic run(input logic [39:0] c);
    pos_t p;
    int q, off, act;
    p = ref_positions(c);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      c_byte = c[8*i +: 8];
      c_load = 1'b1;
    end
    @(negedge clk);
    c_load = 1'b0;
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    q = 0;
    for (int g = 0; g < 136; g++) begin
      byte_idx = 8'(g);
      #1;
      off = g - int'(p[q < 5 ? q : 4] / 8);
      act = (q < 5) && off >= 0 && off < 20;
      checks++;
      if (n_zero !== 1'(act) || (act && (sel !== 5'(off) || c2 !== 3'(p[q] % 8)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL c=%010h byte %0d: n_zero=%0d sel=%0d c2=%0d, exp %0d %0d %0d",
                   c, g, n_zero, sel, c2, act, off, p[q < 5 ? q : 4] % 8);
      end
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      if (act && off == 19) q++;
    end
  endtask

  initial begin
    pos_t p;
    int ex1 [5] = '{0, 160, 320, 480, 640};
    int ex2 [5] = '{1, 175, 356, 547, 741};
    p = ref_positions(40'h00_0000_0000);
    foreach (ex1[i]) begin checks++; if (p[i] != ex1[i]) failures++; end
    p = ref_positions(40'h44_E3A2_C120);
    foreach (ex2[i]) begin checks++; if (p[i] != ex2[i]) failures++; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(40'h00_0000_0000);
    run(40'h44_E3A2_C120);
    run(40'h00_0000_0020);
    for (int k = 0; k < 20; k++) run({$urandom, 8'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
