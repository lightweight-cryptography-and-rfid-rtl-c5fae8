// tb_gps_ctrl_ser: checks the controller of the serialized variant alone.
// A behavioural microcontroller drives the handshake (nibble mode); a small
// model stands in for the PRESENT round counter, and S_Storage's overflow
// is modelled as n_zero && sel == 19 on the second nibble of a byte. Every
// cycle with a control action is recorded and compared with the expected
// sequence: 16 IV nibble loads, one prep cycle, then per block a key init,
// 31 x (16 S-box steps + 1 permutation/key-schedule step) in 527
// consecutive cycles, 16 output steps with add_key set and n_zero/sel/c2
// matching the golden challenge positions, then two flush cycles and 16
// IV-output rotations without add_key.
module tb_gps_ctrl_ser;
  import gps_pkg::*;
  import gps_ref_pkg::*;

  typedef struct {
    int       cyc;
    ps_op_e   op;
    logic     add_key, en_add, clr, step, nz;
    logic [4:0] sel;
    logic [2:0] c2;
    logic [7:0] din;
  } ev_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx, tx;
  logic [7:0] din;
  ps_ctrl_t ps;
  s_ctrl_t  sc;
  logic [4:0] round;
  logic en_add, add_clr, nib = 1'b0;
  logic [7:0] zero8 = '0;
  int cyc = 0;
  ev_t trace [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gps_ctrl_ser dut (.clk, .rst_n, .rx, .tx, .data_in(din), .ps_ctrl(ps), .round, .s_ctrl(sc),
    .overflow(sc.n_zero && nib && sc.sel == 5'd19), .en_add, .add_clr);

  gps_uc_model #(.NIBBLE(1'b1), .MAX_WAIT(2)) uc (.clk, .rx, .tx, .data_in(din), .data_out(zero8));

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) round <= 5'd1;
    else if (ps.op == PS_KEY_INIT) round <= 5'd1;
    else if (ps.op == PS_PLAYER_KS) round <= round + 5'd1;
    if (sc.step) nib <= ~nib;
    if (rst_n && (ps.op != PS_NOP || en_add || sc.step))
      trace.push_back('{cyc: cyc, op: ps.op, add_key: ps.add_key, en_add: en_add, clr: add_clr,
                        step: sc.step, nz: sc.n_zero, sel: sc.sel, c2: sc.c2, din: din});
  end

  function automatic ev_t mk(input ps_op_e op, input logic ak, en, clr, step, nz,
                             input int sel = 0, input int c2 = 0, input int din = 0);
    return '{cyc: 0, op: op, add_key: ak, en_add: en, clr: clr, step: step, nz: nz,
             sel: 5'(sel), c2: 3'(c2), din: 8'(din)};
  endfunction

  task automatic compare(input logic [63:0] iv, input logic [39:0] c);
    ev_t exp [$];
    pos_t p;
    int q, k, off, act, first_sbox;
    p = ref_positions(c);
    for (int i = 0; i < 16; i++) exp.push_back(mk(PS_LOAD_IV, 0, 0, 0, 0, 0, 0, 0, iv[4*i +: 4]));
    exp.push_back(mk(PS_NOP, 0, 1, 1, 0, 0));
    q = 0;
    for (int b = 0; b < 17; b++) begin
      exp.push_back(mk(PS_KEY_INIT, 0, 0, 0, 0, 0));
      for (int r = 0; r < 31; r++) begin
        for (int j = 0; j < 16; j++) exp.push_back(mk(PS_SBOX, 0, 0, 0, 0, 0));
        exp.push_back(mk(PS_PLAYER_KS, 0, 0, 0, 0, 0));
      end
      for (int j = 0; j < 16; j++) begin
        off = (16 * b + j) / 2 - int'(p[q < 5 ? q : 4] / 8);
        act = (q < 5) && off >= 0 && off < 20;
        exp.push_back(mk(PS_ROTATE, 1, 1, 0, 1, 1'(act), act ? off : 0, act ? p[q] % 8 : 0));
        if (act && off == 19 && j % 2 == 1) q++;
      end
    end
    repeat (2) exp.push_back(mk(PS_NOP, 0, 1, 1, 1, 0));
    for (int j = 0; j < 16; j++) exp.push_back(mk(PS_ROTATE, 0, 0, 0, 0, 0));
    checks++;
    if (trace.size() != exp.size()) begin
      failures++;
      $display("FAIL %0d events, expected %0d", trace.size(), exp.size());
    end
    k = 0;
    foreach (exp[i]) begin
      ev_t g;
      if (i >= trace.size()) break;
      g = trace[i];
      checks++;
      if (g.op != exp[i].op || g.add_key != exp[i].add_key || g.en_add != exp[i].en_add ||
          g.clr != exp[i].clr || g.step != exp[i].step || g.nz != exp[i].nz ||
          (g.op == PS_LOAD_IV && g.din[3:0] != exp[i].din[3:0]) ||
          (g.nz && (g.sel != exp[i].sel || g.c2 != exp[i].c2))) begin
        failures++;
        if (k++ < 8) $display("FAIL event %0d: op %s ak %0d en %0d clr %0d step %0d nz %0d sel %0d c2 %0d, exp op %s nz %0d sel %0d",
                              i, g.op.name(), g.add_key, g.en_add, g.clr, g.step, g.nz, g.sel, g.c2,
                              exp[i].op.name(), exp[i].nz, exp[i].sel);
      end
      if (g.op == PS_SBOX && (i == 0 || trace[i-1].op == PS_KEY_INIT)) first_sbox = g.cyc;
      if (g.op == PS_ROTATE && g.add_key && trace[i-1].op == PS_PLAYER_KS) begin
        checks++;
        if (trace[i-1].cyc - first_sbox != 526) begin
          failures++;
          $display("FAIL block compute took %0d cycles", trace[i-1].cyc - first_sbox + 1);
        end
      end
    end
    trace.delete();
  endtask

  initial begin
    logic [63:0] iv, ivn;
    logic [39:0] c;
    logic [1087:0] y;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      iv = {$urandom, $urandom};
      c  = (k == 0) ? 40'h44_E3A2_C120 : (k == 1) ? 40'h00_0000_0020 : {$urandom, 8'($urandom)};
      uc.run(iv, c, '0, 1'b0, y, ivn);
      repeat (3) @(posedge clk);
      compare(iv, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
