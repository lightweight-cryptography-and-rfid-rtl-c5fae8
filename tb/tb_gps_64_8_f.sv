// tb_gps_64_8_f: end-to-end test of gps_64_8_f with a behavioural microcontroller.
//
// Runs several complete exchanges: the two example challenges of the
// compact encoding (all-zero bytes, and 44 E3 A2 C1 20) and random ones,
// chaining each run's returned IV into the next run. Every response chunk
// and the returned IV are compared with the golden model of gps_ref_pkg.
// The first run uses a microcontroller that answers at once and checks
// that the compute time between two blocks is 33 cycles; later runs add
// random think time.
module tb_gps_64_8_f;
  import gps_ref_pkg::*;

  localparam logic [79:0]  KEY = 80'h1F2E_3D4C_5B6A_7988_A7B6;
  localparam logic [159:0] S_F = 160'hC3A5_0F1E_2D3C_4B5A_6978_8796_A5B4_C3D2_E1F0_1234;

  logic clk = 1'b0;
  logic n_reset = 1'b0;
  logic rx_fast, rx_slow, rx, tx;
  logic [7:0] din_fast, din_slow, data_in, data_out;
  bit use_slow = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign rx      = use_slow ? rx_slow : rx_fast;
  assign data_in = use_slow ? din_slow : din_fast;

  gps_64_8_f #(.KEY(KEY), .S_SECRET(S_F)) dut (
    .clk, .n_reset, .rx, .tx, .data_in, .data_out
  );

  gps_uc_model #(.NIBBLE(1'b0), .MAX_WAIT(0)) uc_fast (
    .clk, .rx(rx_fast), .tx, .data_in(din_fast), .data_out
  );
  gps_uc_model #(.NIBBLE(1'b0), .MAX_WAIT(4)) uc_slow (
    .clk, .rx(rx_slow), .tx, .data_in(din_slow), .data_out
  );

  task automatic one_run(input logic [63:0] iv, input logic [39:0] c, input logic [159:0] s,
                         output logic [63:0] ivn);
    logic [1087:0] y_got, y_exp;
    logic [63:0]   iv_exp;
    ref_response(KEY, iv, c, s, y_exp, iv_exp);
    if (use_slow) uc_slow.run(iv, c, s, 1'b0, y_got, ivn);
    else          uc_fast.run(iv, c, s, 1'b0, y_got, ivn);
    for (int i = 0; i < 136; i++) begin
      checks++;
      if (y_got[8*i +: 8] !== y_exp[8*i +: 8]) begin
        failures++;
        if (failures < 10) $display("FAIL y byte %0d: got %02h exp %02h (c=%010h)", i, y_got[8*i +: 8], y_exp[8*i +: 8], c);
      end
    end
    checks++;
    if (ivn !== iv_exp) begin
      failures++;
      $display("FAIL next IV: got %016h exp %016h", ivn, iv_exp);
    end
  endtask

  initial begin
    logic [63:0] iv, ivn;
    logic [159:0] s;
    s = S_F;
    repeat (3) @(posedge clk);
    n_reset = 1'b1;
    iv = 64'h0123_4567_89AB_CDEF;
    one_run(iv, 40'h00_0000_0000, s, ivn);
    checks++;
    foreach (uc_fast.gap_cycles[i]) if (uc_fast.gap_cycles[i] != 33) begin
      failures++;
      $display("FAIL compute gap %0d cycles, expected 33", uc_fast.gap_cycles[i]);
      break;
    end
    if (uc_fast.gap_cycles.size() != 16) begin
      failures++;
      $display("FAIL %0d gaps measured", uc_fast.gap_cycles.size());
    end
    use_slow = 1'b1;
    iv = ivn;
    if (0) s = {$urandom, $urandom, $urandom, $urandom, $urandom};
    one_run(iv, 40'h44_E3A2_C120, s, ivn);
    for (int k = 0; k < 4; k++) begin
      iv = ivn;
      if (0) s = {$urandom, $urandom, $urandom, $urandom, $urandom};
      one_run(iv, {$urandom, 8'($urandom)}, s, ivn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
