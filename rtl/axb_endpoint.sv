// axb_endpoint: the protocol stack at one end of a serial lane.
//
// Master and slave sides of the bridge use the same stack:
//   transmission queue -> ARQ -> link layer -> serializer  -> tx_bit
//   receive queue      <- ARQ <- link layer <- deserializer <- rx_bit
// The application side pushes packets into the transmission queue
// (app_tx_*) and pops received packets from the receive queue (app_rx_*),
// both with valid/ready handshakes. Header fields seqn/ack/ackn are
// filled in by the ARQ layer; the application only sets type, len/nlen
// and payload. Packets are only sent while `locked` is high; `state`
// shows the link receiver state. tx_count / retx_count count packets sent
// the first time and retransmissions; crc_errors and sync_errors count
// dropped frames and link resynchronisations caused by bit errors.
// Queue depths are this design's choice (the protocol only names the
// queues).
module axb_endpoint
  import axb_pkg::*;
#(
  parameter int unsigned TXQ_DEPTH   = 4,
  parameter int unsigned RXQ_DEPTH   = 4,
  parameter int unsigned TIMEOUT     = 512,
  parameter int unsigned MAX_RETRIES = 8,
  parameter int unsigned NTAPS       = 32
) (
  input  logic        clk,
  input  logic        rst,
  // application side
  input  logic        app_tx_valid,
  output logic        app_tx_ready,
  input  packet_t     app_tx_pkt,
  output logic        app_rx_valid,
  input  logic        app_rx_ready,
  output packet_t     app_rx_pkt,
  // status
  output logic        locked,
  output link_state_e state,
  output logic [31:0] tx_count,
  output logic [31:0] retx_count,
  output logic [31:0] crc_errors,
  output logic [31:0] sync_errors,
  // serial lane
  output logic        tx_bit,
  input  logic        rx_bit,
  output logic [$clog2(NTAPS)-1:0] delay_tap
);

  logic    q_valid, q_ready, l_valid, l_ready, r_valid, d_valid, d_ready;
  packet_t q_pkt, l_pkt, r_pkt, d_pkt;
  logic    soft_reset, crc_err, sync_err;

  axb_fifo #(.T(packet_t), .DEPTH(TXQ_DEPTH)) u_txq (
    .clk, .rst,
    .in_valid (app_tx_valid), .in_ready (app_tx_ready), .in_data (app_tx_pkt),
    .out_valid(q_valid),      .out_ready(q_ready),      .out_data(q_pkt),
    .count    ()
  );

  axb_arq #(.TIMEOUT(TIMEOUT), .MAX_RETRIES(MAX_RETRIES)) u_arq (
    .clk, .rst,
    .q_valid, .q_ready, .q_pkt,
    .l_valid, .l_ready, .l_pkt,
    .r_valid, .r_pkt,
    .d_valid, .d_ready, .d_pkt,
    .locked, .soft_reset, .tx_count, .retx_count
  );

  axb_link #(.NTAPS(NTAPS)) u_link (
    .clk, .rst, .soft_reset,
    .pkt_in_valid (l_valid), .pkt_in_ready(l_ready), .pkt_in(l_pkt),
    .pkt_out_valid(r_valid), .pkt_out(r_pkt),
    .locked, .state, .crc_err, .sync_err,
    .tx_bit, .rx_bit, .delay_tap
  );

  axb_fifo #(.T(packet_t), .DEPTH(RXQ_DEPTH)) u_rxq (
    .clk, .rst,
    .in_valid (d_valid),      .in_ready (d_ready),      .in_data (d_pkt),
    .out_valid(app_rx_valid), .out_ready(app_rx_ready), .out_data(app_rx_pkt),
    .count    ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      crc_errors  <= '0;
      sync_errors <= '0;
    end else begin
      if (crc_err)  crc_errors  <= crc_errors + 1'b1;
      if (sync_err) sync_errors <= sync_errors + 1'b1;
    end
  end

endmodule
