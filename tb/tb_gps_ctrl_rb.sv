// tb_gps_ctrl_rb: checks the round-based controller alone, both with a
// fixed secret (default) and with a loadable one (VAR_S = 1).
// A behavioural microcontroller drives the handshake; a small model stands
// in for the PRESENT round counter, and S_Storage's overflow is modelled as
// n_zero && sel == 19. Every cycle with a control action is recorded and
// the trace is compared with the expected sequence: 8 IV loads carrying the
// IV bytes in order, 20 s writes (VAR_S only), one prep cycle (key init,
// carry clear), then per block 31 rounds and a final step in 32
// consecutive cycles followed by 8 output steps whose n_zero/sel/c2 match
// the golden challenge positions, one flush and 8 IV-output rotations.
module tb_gps_ctrl_rb;
  import gps_pkg::*;
  import gps_ref_pkg::*;

  typedef struct {
    int       cyc;
    ps_op_e   op;
    logic     en_add, clr, step, nz, s_we;
    logic [4:0] sel;
    logic [2:0] c2;
    logic [7:0] din;
  } ev_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx [2], tx [2];
  logic [7:0] din [2];
  ps_ctrl_t ps [2];
  s_ctrl_t  sc [2];
  logic [4:0] round [2];
  logic s_we [2], en_add [2], add_clr [2];
  logic [7:0] zero8 = '0;
  int cyc = 0;
  ev_t trace [2][$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gps_ctrl_rb dut0 (.clk, .rst_n, .rx(rx[0]), .tx(tx[0]), .data_in(din[0]),
    .ps_ctrl(ps[0]), .round(round[0]), .s_ctrl(sc[0]), .overflow(sc[0].n_zero && sc[0].sel == 5'd19),
    .s_we(s_we[0]), .en_add(en_add[0]), .add_clr(add_clr[0]));
  gps_ctrl_rb #(.VAR_S(1'b1)) dut1 (.clk, .rst_n, .rx(rx[1]), .tx(tx[1]), .data_in(din[1]),
    .ps_ctrl(ps[1]), .round(round[1]), .s_ctrl(sc[1]), .overflow(sc[1].n_zero && sc[1].sel == 5'd19),
    .s_we(s_we[1]), .en_add(en_add[1]), .add_clr(add_clr[1]));

  gps_uc_model #(.MAX_WAIT(2)) uc0 (.clk, .rx(rx[0]), .tx(tx[0]), .data_in(din[0]), .data_out(zero8));
  gps_uc_model #(.MAX_WAIT(2)) uc1 (.clk, .rx(rx[1]), .tx(tx[1]), .data_in(din[1]), .data_out(zero8));

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      if (!rst_n) round[d] <= 5'd1;
      else if (ps[d].op == PS_KEY_INIT || ps[d].op == PS_FINAL) round[d] <= 5'd1;
      else if (ps[d].op == PS_ROUND) round[d] <= round[d] + 5'd1;
      if (rst_n && (ps[d].op != PS_NOP || en_add[d] || sc[d].step || s_we[d]))
        trace[d].push_back('{cyc: cyc, op: ps[d].op, en_add: en_add[d], clr: add_clr[d],
                              step: sc[d].step, nz: sc[d].n_zero, s_we: s_we[d],
                              sel: sc[d].sel, c2: sc[d].c2, din: din[d]});
    end
  end
  always @(posedge clk) cyc++;

  function automatic ev_t mk(input ps_op_e op, input logic en, clr, step, nz, we,
                             input int sel = 0, input int c2 = 0, input int din = 0);
    return '{cyc: 0, op: op, en_add: en, clr: clr, step: step, nz: nz, s_we: we,
             sel: 5'(sel), c2: 3'(c2), din: 8'(din)};
  endfunction

  task automatic compare(input int d, input logic [63:0] iv, input logic [39:0] c,
                         input logic [159:0] s);
    ev_t exp [$];
    pos_t p;
    int q, k, off, act, first_round;
    p = ref_positions(c);
    for (int i = 0; i < 8; i++) exp.push_back(mk(PS_LOAD_IV, 0, 0, 0, 0, 0, 0, 0, iv[8*i +: 8]));
    if (d == 1) for (int i = 0; i < 20; i++) exp.push_back(mk(PS_NOP, 0, 0, 0, 0, 1, i, 0, s[8*i +: 8]));
    exp.push_back(mk(PS_KEY_INIT, 1, 1, 0, 0, 0));
    q = 0;
    for (int b = 0; b < 17; b++) begin
      for (int r = 0; r < 31; r++) exp.push_back(mk(PS_ROUND, 0, 0, 0, 0, 0));
      exp.push_back(mk(PS_FINAL, 0, 0, 0, 0, 0));
      for (int j = 0; j < 8; j++) begin
        off = 8 * b + j - int'(p[q < 5 ? q : 4] / 8);
        act = (q < 5) && off >= 0 && off < 20;
        exp.push_back(mk(PS_ROTATE, 1, 0, 1, 1'(act), 0, act ? off : 0, act ? p[q] % 8 : 0));
        if (act && off == 19) q++;
      end
    end
    exp.push_back(mk(PS_NOP, 1, 1, 1, 0, 0));
    for (int j = 0; j < 8; j++) exp.push_back(mk(PS_ROTATE, 0, 0, 0, 0, 0));
    checks++;
    if (trace[d].size() != exp.size()) begin
      failures++;
      $display("FAIL dut%0d: %0d events, expected %0d", d, trace[d].size(), exp.size());
    end
    k = 0;
    foreach (exp[i]) begin
      ev_t g;
      if (i >= trace[d].size()) break;
      g = trace[d][i];
      checks++;
      if (g.op != exp[i].op || g.en_add != exp[i].en_add || g.clr != exp[i].clr ||
          g.step != exp[i].step || g.nz != exp[i].nz || g.s_we != exp[i].s_we ||
          ((g.op == PS_LOAD_IV || g.s_we) && g.din != exp[i].din) ||
          (g.s_we && g.sel != exp[i].sel) ||
          (g.nz && (g.sel != exp[i].sel || g.c2 != exp[i].c2))) begin
        failures++;
        if (k++ < 8) $display("FAIL dut%0d event %0d: op %s en %0d clr %0d step %0d nz %0d we %0d sel %0d c2 %0d, exp op %s nz %0d sel %0d c2 %0d",
                              d, i, g.op.name(), g.en_add, g.clr, g.step, g.nz, g.s_we, g.sel, g.c2,
                              exp[i].op.name(), exp[i].nz, exp[i].sel, exp[i].c2);
      end
      if (g.op == PS_ROUND && (i == 0 || trace[d][i-1].op != PS_ROUND)) first_round = g.cyc;
      if (g.op == PS_FINAL) begin
        checks++;
        if (g.cyc - first_round != 31) begin
          failures++;
          $display("FAIL dut%0d block compute took %0d cycles", d, g.cyc - first_round + 1);
        end
      end
    end
    trace[d].delete();
  endtask

  initial begin
    logic [63:0] iv, ivn;
    logic [39:0] c;
    logic [159:0] s;
    logic [1087:0] y;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      iv = {$urandom, $urandom};
      s  = {$urandom, $urandom, $urandom, $urandom, $urandom};
      c  = (k == 0) ? 40'h44_E3A2_C120 : (k == 1) ? 40'h00_0000_0020 : {$urandom, 8'($urandom)};
      fork
        uc0.run(iv, c, s, 1'b0, y, ivn);
        uc1.run(iv, c, s, 1'b1, y, ivn);
      join
      repeat (3) @(posedge clk);
      compare(0, iv, c, s);
      compare(1, iv, c, s);
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
