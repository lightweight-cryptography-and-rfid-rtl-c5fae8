// tb_gps_asic_top: end-to-end test of the whole chip, all parameters at
// their defaults. The three cores run at the same time, each on its own
// clock and with its own behavioural microcontroller, through a sequence
// of runs whose IVs chain (each run starts from the IV the previous run
// returned). Every response chunk and returned IV is checked against the
// golden model. The test also counts how often each mechanism of the
// design happened and fails if one never did:
//   stall      the microcontroller requested data before the core had it;
//   carry      a carry crossed from one chunk of y to the next;
//   merge      the overflow register of S_Storage was ORed into the first
//              chunk of the next copy of s (two copies sharing a byte);
//   shift      a copy of s at a bit offset that is not a multiple of 8;
//   truncate   a copy of s reaching past the 1088-bit response;
//   chain      a run started from the IV returned by the previous run;
//   s_reload   the loadable-secret core answered with a newly loaded s.
module tb_gps_asic_top;
  import gps_ref_pkg::*;

  // Default values of the top's KEY and S_SECRET parameters.
  localparam logic [79:0]  KEY = 80'hFEDC_BA98_7654_3210_0F1E;
  localparam logic [159:0] S_F = 160'h9A3C_5E71_0BD2_46F8_E1C7_2A95_3D60_B8F4_7C1E_2D59;
  localparam int N_RUNS = 4;

  logic       clk [3];
  logic       n_reset = 1'b0;
  logic       rx [3], tx [3];
  logic [7:0] din [3], dout [3];
  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_merge = 0, n_shift = 0, n_trunc = 0, n_chain = 0, n_sreload = 0;

  initial begin
    clk[0] = 1'b0; clk[1] = 1'b0; clk[2] = 1'b0;
  end
  always #5 clk[0] = ~clk[0];
  always #6 clk[1] = ~clk[1];
  always #7 clk[2] = ~clk[2];

  gps_asic_top dut (
    .f8_clk(clk[0]), .f8_n_reset(n_reset), .f8_rx(rx[0]), .f8_tx(tx[0]),
    .f8_data_in(din[0]), .f8_data_out(dout[0]),
    .v8_clk(clk[1]), .v8_n_reset(n_reset), .v8_rx(rx[1]), .v8_tx(tx[1]),
    .v8_data_in(din[1]), .v8_data_out(dout[1]),
    .f4_clk(clk[2]), .f4_n_reset(n_reset), .f4_rx(rx[2]), .f4_tx(tx[2]),
    .f4_data_in(din[2]), .f4_data_out(dout[2])
  );

  gps_uc_model #(.NIBBLE(1'b0), .MAX_WAIT(3)) uc0 (
    .clk(clk[0]), .rx(rx[0]), .tx(tx[0]), .data_in(din[0]), .data_out(dout[0]));
  gps_uc_model #(.NIBBLE(1'b0), .MAX_WAIT(3)) uc1 (
    .clk(clk[1]), .rx(rx[1]), .tx(tx[1]), .data_in(din[1]), .data_out(dout[1]));
  gps_uc_model #(.NIBBLE(1'b1), .MAX_WAIT(3)) uc2 (
    .clk(clk[2]), .rx(rx[2]), .tx(tx[2]), .data_in(din[2]), .data_out(dout[2]));

  // Mechanism probes inside the round-based fixed core.
  always @(posedge clk[0]) begin
    if (dut.u_gps_64_8_f.u_addwc.en_add && !dut.u_gps_64_8_f.u_addwc.clr &&
        dut.u_gps_64_8_f.u_addwc.carry_q)
      n_carry++;
    if (dut.u_gps_64_8_f.control_s.step && dut.u_gps_64_8_f.control_s.n_zero &&
        dut.u_gps_64_8_f.control_s.sel == 5'd0 && dut.u_gps_64_8_f.u_s_storage.greg_q != 8'h00)
      n_merge++;
  end

  function automatic logic [39:0] challenge(input int run, input int v);
    unique case (run)
      0: return 40'h00_0000_0000;                        // all-zero example
      1: return 40'h44_E3A2_C120;                        // second worked example
      2: return (v == 0) ? 40'h00_0000_0020 : 40'hFF_FFFF_FF00;  // shared byte / truncation
      default: return {$urandom, 8'($urandom)};
    endcase
  endfunction

  task automatic check_run(input int v, input logic [63:0] iv, input logic [39:0] c,
                           input logic [159:0] s, input logic [1087:0] y_got,
                           input logic [63:0] iv_got);
    logic [1087:0] y_exp;
    logic [63:0]   iv_exp;
    pos_t          p;
    ref_response(KEY, iv, c, s, y_exp, iv_exp);
    for (int i = 0; i < 136; i++) begin
      checks++;
      if (y_got[8*i +: 8] !== y_exp[8*i +: 8]) begin
        failures++;
        if (failures < 10) $display("FAIL core %0d y byte %0d: got %02h exp %02h", v, i, y_got[8*i +: 8], y_exp[8*i +: 8]);
      end
    end
    checks++;
    if (iv_got !== iv_exp) begin
      failures++;
      $display("FAIL core %0d next IV got %016h exp %016h", v, iv_got, iv_exp);
    end
    p = ref_positions(c);
    for (int i = 0; i < 5; i++) begin
      if (p[i] % 8 != 0) n_shift++;
      if (p[i] + 160 > 1088) n_trunc++;
    end
  endtask

  task automatic core_runs(input int v);
    logic [63:0]   iv, ivn;
    logic [159:0]  s;
    logic [39:0]   c;
    logic [1087:0] y;
    iv = {$urandom, $urandom};
    s  = S_F;
    for (int r = 0; r < N_RUNS; r++) begin
      c = challenge(r, v);
      if (v == 1) begin
        s = {$urandom, $urandom, $urandom, $urandom, $urandom};
        if (r > 0) n_sreload++;
      end
      unique case (v)
        0: uc0.run(iv, c, s, 1'b0, y, ivn);
        1: uc1.run(iv, c, s, 1'b1, y, ivn);
        default: uc2.run(iv, c, s, 1'b0, y, ivn);
      endcase
      check_run(v, iv, c, s, y, ivn);
      if (r > 0) n_chain++;
      iv = ivn;
    end
  endtask

  initial begin
    #100;
    n_reset = 1'b1;
    fork
      core_runs(0);
      core_runs(1);
      core_runs(2);
    join
    n_stall = uc0.early_req + uc1.early_req + uc2.early_req;
    $display("mechanisms: stall=%0d carry=%0d merge=%0d shift=%0d truncate=%0d chain=%0d s_reload=%0d",
             n_stall, n_carry, n_merge, n_shift, n_trunc, n_chain, n_sreload);
    checks += 7;
    if (n_stall == 0)   begin failures++; $display("FAIL no stall");    end
    if (n_carry == 0)   begin failures++; $display("FAIL no carry");    end
    if (n_merge == 0)   begin failures++; $display("FAIL no merge");    end
    if (n_shift == 0)   begin failures++; $display("FAIL no shift");    end
    if (n_trunc == 0)   begin failures++; $display("FAIL no truncate"); end
    if (n_chain == 0)   begin failures++; $display("FAIL no chain");    end
    if (n_sreload == 0) begin failures++; $display("FAIL no s_reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
