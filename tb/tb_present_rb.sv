// tb_present_rb: checks the round-based PRESENT-80 core alone.
// Drives control_ps directly: byte-wise IV load, key init, PS_ROUND until
// the core reports round 31, one PS_FINAL, then eight PS_ROTATE reads.
// Checks the published PRESENT-80 test vectors (through a KEY override in
// a second instance), random blocks against the golden model, OFB
// chaining (a second encryption of the ciphertext left in the state), and
// that one block takes exactly 32 cycles (31 rounds + final).
module tb_present_rb;
  import gps_pkg::*;
  import gps_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ps_ctrl_t   ctrl [2];
  logic [7:0] iv_in [2];
  logic [4:0] round [2];
  logic [7:0] ps_out [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_rb dut0 (.clk, .rst_n, .ctrl(ctrl[0]), .iv_in(iv_in[0]), .round(round[0]), .ps_out(ps_out[0]));
  present_rb #(.KEY(80'hFFFF_FFFF_FFFF_FFFF_FFFF)) dut1 (
    .clk, .rst_n, .ctrl(ctrl[1]), .iv_in(iv_in[1]), .round(round[1]), .ps_out(ps_out[1]));

  task automatic op(input int d, input ps_op_e o);
    ctrl[d] = '{op: o, add_key: 1'b0};
    @(posedge clk);
    #1 ctrl[d] = '{op: PS_NOP, add_key: 1'b0};
  endtask

  task automatic load(input int d, input logic [63:0] iv);
    for (int i = 0; i < 8; i++) begin
      iv_in[d] = iv[8*i +: 8];
      op(d, PS_LOAD_IV);
    end
  endtask

  // encrypt what is in the state; returns cycles used
  task automatic encrypt(input int d, output int cyc);
    cyc = 0;
    while (round[d] != 5'd31) begin op(d, PS_ROUND); cyc++; end
    op(d, PS_ROUND); cyc++;
    op(d, PS_FINAL); cyc++;
  endtask

  task automatic read(input int d, output logic [63:0] ct);
    for (int i = 0; i < 8; i++) begin
      ct[8*i +: 8] = ps_out[d];
      op(d, PS_ROTATE);
    end
  endtask

  task automatic expect64(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h exp %016h", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] ct, pt;
    int cyc;
    ctrl[0] = '{op: PS_NOP, add_key: 1'b0};
    ctrl[1] = '{op: PS_NOP, add_key: 1'b0};
    iv_in[0] = '0; iv_in[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Published test vectors, key all ones.
    op(1, PS_KEY_INIT);
    load(1, 64'h0); encrypt(1, cyc); read(1, ct);
    expect64("vector k=FF..,p=0", ct, 64'hE72C_46C0_F594_5049);
    load(1, 64'hFFFF_FFFF_FFFF_FFFF); encrypt(1, cyc); read(1, ct);
    expect64("vector k=FF..,p=FF..", ct, 64'h3333_DCD3_2132_10D2);
    expect64("golden model vector", ref_present(80'hFFFF_FFFF_FFFF_FFFF_FFFF, 64'h0), 64'hE72C_46C0_F594_5049);
    expect64("golden model vector 2", ref_present(80'h0, 64'h0), 64'h5579_C138_7B22_8445);
    // Default key, random plaintexts and OFB chaining.
    op(0, PS_KEY_INIT);
    for (int k = 0; k < 10; k++) begin
      pt = {$urandom, $urandom};
      load(0, pt); encrypt(0, cyc); read(0, ct);
      expect64("random block", ct, ref_present(80'hFEDC_BA98_7654_3210_0F1E, pt));
      checks++;
      if (cyc != 32) begin failures++; $display("FAIL block took %0d cycles", cyc); end
      encrypt(0, cyc); read(0, pt);
      expect64("OFB next block", pt, ref_present(80'hFEDC_BA98_7654_3210_0F1E, ct));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
