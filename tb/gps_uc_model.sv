// gps_uc_model: behavioural model of the microcontroller side of the
// rx/tx four-phase handshake, used by the testbenches.
//
// send() offers one data_in chunk, recv() fetches one data_out chunk;
// run() performs a complete cryptoGPS exchange: IV (8 bytes, or 16 nibbles
// when NIBBLE = 1), the five challenge bytes, optionally the 20 bytes of s,
// then the response (136 bytes or 272 nibbles) and the next IV. MAX_WAIT
// sets a random think time in cycles before each edge of rx (0: answer at
// once). gap_cycles records, for each block after the first, the cycles
// from tx falling after a block's last chunk to tx rising for the next.
module gps_uc_model #(
  parameter bit NIBBLE   = 1'b0,
  parameter int MAX_WAIT = 3
) (
  input  logic       clk,
  output logic       rx,
  input  logic       tx,
  output logic [7:0] data_in,
  input  logic [7:0] data_out
);
  int gap_cycles [$];
  int early_req;   // transfers where rx was up before the core was ready
  int cyc;
  int t_fall;

  initial begin
    rx      = 1'b0;
    data_in = '0;
    cyc     = 0;
    early_req = 0;
  end

  always @(posedge clk) cyc++;

  task automatic think();
    int n;
    n = (MAX_WAIT > 0) ? $urandom_range(MAX_WAIT, 0) : 0;
    repeat (n) @(negedge clk);
  endtask

  task automatic handshake(output logic [7:0] rd);
    int w;
    think();
    @(negedge clk);
    rx = 1'b1;
    w = 0;
    while (!tx) begin
      @(negedge clk);
      w++;
    end
    if (w > 4) early_req++;
    think();
    rd = data_out;
    rx = 1'b0;
    while (tx) @(negedge clk);
  endtask

  task automatic send(input logic [7:0] b);
    logic [7:0] unused;
    @(negedge clk);
    data_in = b;
    handshake(unused);
  endtask

  task automatic recv(output logic [7:0] b);
    handshake(b);
  endtask

  task automatic run(input logic [63:0] iv, input logic [39:0] c,
                     input logic [159:0] s, input bit load_s,
                     output logic [1087:0] y, output logic [63:0] iv_next);
    logic [7:0] b;
    int chunk_bits, n_y, per_blk;
    chunk_bits = NIBBLE ? 4 : 8;
    n_y        = 1088 / chunk_bits;
    per_blk    = 64 / chunk_bits;
    for (int i = 0; i < 64 / chunk_bits; i++) send(8'(iv >> (chunk_bits * i)) & (NIBBLE ? 8'h0F : 8'hFF));
    for (int i = 0; i < 5; i++) send(c[8*i +: 8]);
    if (load_s) for (int i = 0; i < 20; i++) send(s[8*i +: 8]);
    y = '0;
    for (int i = 0; i < n_y; i++) begin
      if (i > 0 && i % per_blk == 0) begin
        // measure compute gap before this block (only meaningful without think time)
        think();
        @(negedge clk);
        rx = 1'b1;
        while (!tx) @(negedge clk);
        gap_cycles.push_back(cyc - t_fall);
        if (MAX_WAIT == 0) ; else think();
        b = data_out;
        rx = 1'b0;
        while (tx) @(negedge clk);
      end else begin
        recv(b);
      end
      if (NIBBLE) y[4*i +: 4] = b[3:0];
      else        y[8*i +: 8] = b;
      if ((i + 1) % per_blk == 0) t_fall = cyc;
    end
    iv_next = '0;
    for (int i = 0; i < 64 / chunk_bits; i++) begin
      recv(b);
      if (NIBBLE) iv_next[4*i +: 4] = b[3:0];
      else        iv_next[8*i +: 8] = b;
    end
  endtask
endmodule
