// axb_arq: stop-and-wait automatic repeat request layer of one lane end.
//
// Sits between the packet queues and the link layer and makes delivery
// reliable: packets arrive once, in order, or the link is resynchronised.
// Both ends of a lane run the same block.
//
// Sending. A packet taken from the transmission queue is kept in a
// retransmission buffer, stamped with the current one-bit sequence number
// and handed to the link. No further packet is taken until an
// acknowledgement carrying the same sequence number arrives; then the
// sequence number toggles. If none arrives within TIMEOUT cycles (counted
// from the hand-over, or while the link is out of sync), the buffered
// packet is sent again. After MAX_RETRIES timeouts in a row a
// one-cycle `soft_reset` is given to the link layer, which then
// resynchronises; the packet stays buffered and is sent again once the
// link is locked.
//
// Receiving. A packet whose sequence number is the expected one is
// delivered to the receive queue and acknowledged; a repeated packet
// (its acknowledgement got lost) is acknowledged again but not delivered.
// A packet that finds the receive queue full is neither delivered nor
// acknowledged, so the sender repeats it later. An acknowledgement rides
// in the header of the next outgoing frame; if no data packet follows
// within ACK_DELAY cycles, a header-only ACK_ONLY packet carries it. The
// short wait lets a bridge slave's response, which is ready a few cycles
// after the request, carry the acknowledgement of that request.
//
// Start-up (own choice). After reset the first packet sent is a SYN. Its
// receiver takes the SYN's sequence number as the last one seen, and after
// its own reset an end accepts the first packet whatever its sequence
// number. So the two ends agree on sequence numbers in both directions
// even when only one of them was reset. SYN is acknowledged like data but
// is not delivered.
//
// The stop-and-wait scheme, one-bit sequence and acknowledgement numbers,
// immediate or piggy-backed acknowledgements, timeout retransmission and
// the soft reset after repeated timeouts follow the published protocol;
// TIMEOUT, MAX_RETRIES, ACK_DELAY and the SYN start-up are this design's
// choices.
module axb_arq
  import axb_pkg::*;
#(
  parameter int unsigned TIMEOUT     = 512,
  parameter int unsigned MAX_RETRIES = 8,
  parameter int unsigned ACK_DELAY   = 16
) (
  input  logic        clk,
  input  logic        rst,
  // from the transmission queue
  input  logic        q_valid,
  output logic        q_ready,
  input  packet_t     q_pkt,
  // to the link layer
  output logic        l_valid,
  input  logic        l_ready,
  output packet_t     l_pkt,
  // from the link layer
  input  logic        r_valid,
  input  packet_t     r_pkt,
  // to the receive queue
  output logic        d_valid,
  input  logic        d_ready,
  output packet_t     d_pkt,
  // link control and status
  input  logic        locked,
  output logic        soft_reset,
  output logic [31:0] tx_count,
  output logic [31:0] retx_count
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  localparam int unsigned RW = $clog2(MAX_RETRIES + 1);
  localparam int unsigned DW = $clog2(ACK_DELAY + 2);

  typedef enum logic [0:0] {A_IDLE, A_WAIT} arq_state_e;

  arq_state_e     st;
  packet_t        buf_pkt;      // retransmission buffer
  logic           send_data;    // buffered packet waits to be handed to the link
  logic           tx_seq;       // sequence number of the buffered / next packet
  logic           rx_exp;       // sequence number expected from the other end
  logic           rx_any;       // no packet received since reset: take any number
  logic           syn_needed;
  logic           ack_pending;
  logic [DW-1:0]  ack_age;      // cycles an acknowledgement has waited
  logic           ack_num;
  logic [TW-1:0]  timer;
  logic [RW-1:0]  retries;
  logic           fresh;        // buffered packet not yet sent once

  // ------------------------------------------------------------ receive side
  logic rx_is_data, rx_is_syn, rx_new, rx_ack_ok, rx_accept;

  assign rx_is_syn  = r_pkt.hdr.typ == PT_SYN;
  assign rx_is_data = r_pkt.hdr.typ != PT_ACK_ONLY && !rx_is_syn;
  assign rx_new     = rx_any || r_pkt.hdr.seqn == rx_exp;
  assign rx_ack_ok  = r_valid && r_pkt.hdr.ack && st == A_WAIT && r_pkt.hdr.ackn == tx_seq;
  // a packet to acknowledge: SYN, a repeat, or a new one that fits the queue
  assign rx_accept  = r_valid && (rx_is_syn || (rx_is_data && (!rx_new || d_ready)));

  assign d_valid = r_valid && rx_is_data && rx_new;
  assign d_pkt   = r_pkt;

  // ------------------------------------------------------------ transmit side
  packet_t out_pkt;

  always_comb begin
    if (send_data) begin
      out_pkt          = buf_pkt;
      out_pkt.hdr.seqn = tx_seq;
    end else begin
      out_pkt          = '0;
      out_pkt.hdr      = make_hdr(PT_ACK_ONLY, 4'd0);
    end
    out_pkt.hdr.ack  = ack_pending;
    out_pkt.hdr.ackn = ack_num;
  end

  assign l_pkt   = out_pkt;
  assign l_valid = locked && (send_data || (ack_pending && ack_age == DW'(ACK_DELAY)));
  assign q_ready = locked && st == A_IDLE && !syn_needed;

  logic handed;
  assign handed = l_valid && l_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= A_IDLE;
      buf_pkt     <= '0;
      send_data   <= 1'b0;
      tx_seq      <= 1'b0;
      rx_exp      <= 1'b0;
      rx_any      <= 1'b1;
      syn_needed  <= 1'b1;
      ack_pending <= 1'b0;
      ack_age     <= '0;
      ack_num     <= 1'b0;
      timer       <= '0;
      retries     <= '0;
      fresh       <= 1'b0;
      soft_reset  <= 1'b0;
      tx_count    <= '0;
      retx_count  <= '0;
    end else begin
      soft_reset <= 1'b0;

      // an acknowledgement leaves with whatever frame the link takes
      if (handed) ack_pending <= 1'b0;
      if (ack_pending && ack_age != DW'(ACK_DELAY)) ack_age <= ack_age + 1'b1;

      // start a new packet: SYN first after reset, then the queue
      if (st == A_IDLE && locked) begin
        if (syn_needed) begin
          buf_pkt     <= '0;
          buf_pkt.hdr <= make_hdr(PT_SYN, 4'd0);
          send_data   <= 1'b1;
          fresh       <= 1'b1;
          st          <= A_WAIT;
          timer       <= '0;
          retries     <= '0;
        end else if (q_valid) begin
          buf_pkt   <= q_pkt;
          send_data <= 1'b1;
          fresh     <= 1'b1;
          st        <= A_WAIT;
          timer     <= '0;
          retries   <= '0;
        end
      end

      if (st == A_WAIT) begin
        if (handed && send_data) begin
          send_data <= 1'b0;
          timer     <= '0;
          fresh     <= 1'b0;
          if (fresh) tx_count <= tx_count + 1'b1;
        end else if (!send_data || !locked) begin
          if (timer == TW'(TIMEOUT - 1)) begin
            timer     <= '0;
            send_data <= 1'b1;
            if (!send_data) retx_count <= retx_count + 1'b1;
            if (retries == RW'(MAX_RETRIES - 1)) begin
              retries    <= '0;
              soft_reset <= 1'b1;
            end else begin
              retries <= retries + 1'b1;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        if (rx_ack_ok) begin
          st         <= A_IDLE;
          send_data  <= 1'b0;
          tx_seq     <= ~tx_seq;
          syn_needed <= 1'b0;
          retries    <= '0;
          timer      <= '0;
        end
      end

      // acknowledge what was received; a later reception overrides the number
      if (rx_accept) begin
        ack_pending <= 1'b1;
        ack_num     <= r_pkt.hdr.seqn;
        if (!ack_pending || handed) ack_age <= '0;
        if (rx_is_syn || rx_new) begin
          rx_exp <= ~r_pkt.hdr.seqn;
          rx_any <= 1'b0;
        end
      end
    end
  end

endmodule
