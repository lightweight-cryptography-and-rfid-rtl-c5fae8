// tb_gps_io_hs: checks the rx/tx four-phase handshake FSM.
// For random ready delays and think times: tx must not rise while ready is
// low; with ready high, xfer pulses exactly once, three clock edges after
// rx rises (two synchronizer stages plus the state register), and tx rises
// with it; done pulses exactly once, two edges after rx falls, and tx falls
// one edge later. xfer and done are never high together.
module tb_gps_io_hs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx = 1'b0, ready = 1'b0;
  logic tx, xfer, done;
  int checks = 0, failures = 0;
  int n_xfer = 0, n_done = 0, cyc = 0;

  always #5 clk = ~clk;

  gps_io_hs dut (.clk, .rst_n, .rx, .ready, .tx, .xfer, .done);

  always @(posedge clk) begin
    cyc++;
    if (xfer) n_xfer++;
    if (done) n_done++;
    if (rst_n && xfer && done) begin
      failures++;
      $display("FAIL xfer and done together");
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int t0, hold, x0, d0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 50; k++) begin
      hold = (k % 2) ? $urandom_range(8, 4) : 0;
      x0 = n_xfer; d0 = n_done;
      @(negedge clk);
      ready = (hold == 0);
      rx = 1'b1;
      t0 = cyc;
      repeat (hold) begin
        @(negedge clk);
        checks++;
        if (tx) begin failures++; $display("FAIL tx while not ready"); end
      end
      ready = 1'b1;
      while (!tx) @(negedge clk);
      if (hold == 0) expect_eq("rx->tx edges", cyc - t0, 3);
      expect_eq("xfer pulses", n_xfer - x0, 1);
      repeat ($urandom_range(3, 0)) @(negedge clk);
      ready = $urandom_range(1, 0);
      rx = 1'b0;
      t0 = cyc;
      while (tx) @(negedge clk);
      expect_eq("rx fall->tx fall edges", cyc - t0, 3);
      expect_eq("done pulses", n_done - d0, 1);
      expect_eq("xfer pulses after done", n_xfer - x0, 1);
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
