// tb_present_ser: checks the serialized PRESENT-80 core alone.
// Drives control_ps directly as the serialized controller does: 16 nibble
// IV loads, key init, 31 x (16 PS_SBOX + 1 PS_PLAYER_KS), then 16
// PS_ROTATE with add_key = 1 that return the ciphertext nibbles and leave
// the ciphertext in the state. Checks the published PRESENT-80 vectors
// (KEY override), random blocks against the golden model, OFB chaining,
// PS_ROTATE without add_key (plain state read), and 527 cycles per block.
module tb_present_ser;
  import gps_pkg::*;
  import gps_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ps_ctrl_t   ctrl [2];
  logic [3:0] iv_in [2];
  logic [4:0] round [2];
  logic [3:0] ps_out [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_ser dut0 (.clk, .rst_n, .ctrl(ctrl[0]), .iv_in(iv_in[0]), .round(round[0]), .ps_out(ps_out[0]));
  present_ser #(.KEY(80'h0)) dut1 (
    .clk, .rst_n, .ctrl(ctrl[1]), .iv_in(iv_in[1]), .round(round[1]), .ps_out(ps_out[1]));

  task automatic op(input int d, input ps_op_e o, input logic ak = 1'b0);
    ctrl[d] = '{op: o, add_key: ak};
    @(posedge clk);
    #1 ctrl[d] = '{op: PS_NOP, add_key: 1'b0};
  endtask

  task automatic load(input int d, input logic [63:0] iv);
    for (int i = 0; i < 16; i++) begin
      iv_in[d] = iv[4*i +: 4];
      op(d, PS_LOAD_IV);
    end
  endtask

  task automatic encrypt(input int d, output int cyc);
    cyc = 0;
    op(d, PS_KEY_INIT);
    forever begin
      repeat (16) begin op(d, PS_SBOX); cyc++; end
      if (round[d] == 5'd31) begin op(d, PS_PLAYER_KS); cyc++; break; end
      op(d, PS_PLAYER_KS); cyc++;
    end
  endtask

  task automatic read(input int d, input logic ak, output logic [63:0] ct);
    for (int i = 0; i < 16; i++) begin
      ctrl[d] = '{op: PS_NOP, add_key: ak};
      #1 ct[4*i +: 4] = ps_out[d];
      op(d, PS_ROTATE, ak);
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
    logic [63:0] ct, pt, st;
    int cyc;
    ctrl[0] = '{op: PS_NOP, add_key: 1'b0};
    ctrl[1] = '{op: PS_NOP, add_key: 1'b0};
    iv_in[0] = '0; iv_in[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    load(1, 64'h0); encrypt(1, cyc); read(1, 1'b1, ct);
    expect64("vector k=0,p=0", ct, 64'h5579_C138_7B22_8445);
    load(1, 64'hFFFF_FFFF_FFFF_FFFF); encrypt(1, cyc); read(1, 1'b1, ct);
    expect64("vector k=0,p=FF..", ct, 64'hA112_FFC7_2F68_417B);
    for (int k = 0; k < 6; k++) begin
      pt = {$urandom, $urandom};
      load(0, pt); encrypt(0, cyc); read(0, 1'b1, ct);
      expect64("random block", ct, ref_present(80'hFEDC_BA98_7654_3210_0F1E, pt));
      checks++;
      if (cyc != 527) begin failures++; $display("FAIL block took %0d cycles", cyc); end
      read(0, 1'b0, st);
      expect64("plain state read", st, ct);
      encrypt(0, cyc); read(0, 1'b1, pt);
      expect64("OFB next block", pt, ref_present(80'hFEDC_BA98_7654_3210_0F1E, ct));
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
