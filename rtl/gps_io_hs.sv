// gps_io_hs: I/O handshake FSM between a cryptoGPS core and the
// independently clocked microcontroller that stands in for the rest of the
// RFID tag.
//
// Each transfer of one data_in or data_out chunk is a four-phase handshake
// on the two wires rx (request, from the microcontroller) and tx
// (acknowledge, to it):
//   1. the microcontroller sets data_in (for a load) and raises rx;
//   2. once the core is ready (input expected, or data_out valid) the FSM
//      raises tx and pulses xfer; a load takes data_in in that cycle;
//   3. the microcontroller reads data_out (for an output) and lowers rx;
//   4. the FSM lowers tx and pulses done; an output advances to the next
//      chunk in that cycle.
// rx passes a two-flip-flop synchronizer first, so data_in must be stable
// from before rx rises until tx has risen. tx comes straight from a
// flip-flop. The pin names rx/tx and the need for synchronization come from
// the document; the four-phase protocol itself is this design's choice.
// Assertions at the end state the rules of the handshake.
module gps_io_hs (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  input  logic ready,
  output logic tx,
  output logic xfer,
  output logic done
);
  typedef enum logic {HS_IDLE, HS_ACK} hs_state_e;

  hs_state_e state_q;
  logic      rx_meta_q, rx_sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta_q <= 1'b0;
      rx_sync_q <= 1'b0;
      state_q   <= HS_IDLE;
    end else begin
      rx_meta_q <= rx;
      rx_sync_q <= rx_meta_q;
      if (xfer)      state_q <= HS_ACK;
      else if (done) state_q <= HS_IDLE;
    end
  end

  assign xfer = (state_q == HS_IDLE) && rx_sync_q && ready;
  assign done = (state_q == HS_ACK) && !rx_sync_q;
  assign tx   = (state_q == HS_ACK);

  // Handshake rules: a transfer is accepted only while tx is low and only
  // completes while tx is high, so the two strobes never coincide, and tx
  // follows each of them on the next edge.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(xfer && done));
  a_xfer_tx:    assert property (@(posedge clk) disable iff (!rst_n) xfer |=> tx);
  a_done_tx:    assert property (@(posedge clk) disable iff (!rst_n) done |=> !tx);
  a_xfer_rdy:   assert property (@(posedge clk) disable iff (!rst_n) xfer |-> ready);
endmodule
