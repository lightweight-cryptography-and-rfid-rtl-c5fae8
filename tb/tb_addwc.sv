// tb_addwc: checks the chunk-serial adder for n = 8 and n = 4.
// Adds random 256-bit numbers chunk by chunk, least significant first
// (carry cleared with en_add & clr before each number), and compares each
// output chunk with the wide sum. Also checks that the carry holds while
// en_add is low.
module tb_addwc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] r8, s8, rs8;
  logic [3:0] r4, s4, rs4;
  logic en8, clr8, en4, clr4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addwc dut8 (.clk, .rst_n, .r(r8), .s(s8), .en_add(en8), .clr(clr8), .rs(rs8));
  addwc #(.N(4)) dut4 (.clk, .rst_n, .r(r4), .s(s4), .en_add(en4), .clr(clr4), .rs(rs4));

  initial begin
    logic [255:0] a, b;
    logic [256:0] sum;
    {en8, clr8, en4, clr4} = '0;
    r8 = '0; s8 = '0; r4 = '0; s4 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      a = {8{$urandom}};
      b = {8{$urandom}};
      if (k % 4 == 0) b = ~a;           // long carry chains
      if (k % 4 == 1) begin a = '1; b = 256'd1; end
      sum = a + b;
      en8 = 1'b1; clr8 = 1'b1; en4 = 1'b1; clr4 = 1'b1;
      @(posedge clk); #1;
      clr8 = 1'b0; clr4 = 1'b0;
      for (int i = 0; i < 64; i++) begin
        if (i < 32) begin
          r8 = a[8*i +: 8]; s8 = b[8*i +: 8];
        end
        r4 = a[4*i +: 4]; s4 = b[4*i +: 4];
        en8 = (i < 32); en4 = 1'b0;
        #1;
        if (i < 32) begin
          checks++;
          if (rs8 !== sum[8*i +: 8]) begin failures++; $display("FAIL n=8 chunk %0d", i); end
        end
        // hold one idle cycle for the 4-bit adder, then step it
        @(posedge clk); #1;
        en8 = 1'b0;
        checks++;
        if (rs4 !== sum[4*i +: 4]) begin failures++; $display("FAIL n=4 chunk %0d", i); end
        en4 = 1'b1;
        @(posedge clk); #1;
        en4 = 1'b0;
      end
    end
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
