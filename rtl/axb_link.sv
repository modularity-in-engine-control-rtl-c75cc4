// axb_link: link layer of one serial lane (synchronisation, framing, CRC).
//
// Both ends of a lane run this same block. It turns packets into framed
// byte streams, serialises them (axb_serdes) and does the reverse on the
// receive side.
//
// Synchronisation. After reset, or after a soft reset requested by the ARQ
// layer, the receiver walks through the states
//   DESKEW -> SLIP -> SYNC -> IDLE (<-> FRAME)
// While DESKEW or SLIP, the transmitter sends the pre-sync comma 0xBC;
// from SYNC on it sends 0xDC, telling the other end that this receiver is
// aligned.
//   DESKEW: the input delay tap (`delay_tap`, driven to an external delay
//     element) is stepped until STABLE_BYTES successive received bytes are
//     equal, i.e. the data no longer changes.
//   SLIP: while the received byte is not a comma, the deserializer's byte
//     boundary is moved by one bit (one slip, then one byte ignored).
//     An 0xBC match leads to SYNC, an 0xDC match (the other end is
//     already aligned) straight to IDLE. After SLIP_LIMIT unsuccessful
//     slips the receiver returns to DESKEW.
//   SYNC: wait for 0xDC from the other end, then IDLE.
//   IDLE: `locked` is high. 0xDC keeps the link idle, 0x1C (start of
//     frame) starts a frame; any other byte is a bit error and restarts
//     synchronisation from DESKEW.
//   FRAME: header (2 bytes), payload (len bytes) and CRC-16 (2 bytes, high
//     byte first) are collected. A header whose nlen is not the
//     complement of len, or whose len exceeds 9, restarts synchronisation;
//     a CRC mismatch only drops the frame (crc_err pulse).
// The comma values, state names and the rule "deskew until the data stops
// changing, then slip until the comma matches" follow the published
// synchronisation sequence; the counts STABLE_BYTES, SLIP_LIMIT, the tap
// count and the error rules above are this design's choices.
//
// Transmit: when `locked` and no frame is pending, a packet is taken on
// pkt_in_valid && pkt_in_ready. The frame is sent as one idle comma,
// 0x1C, header, payload, CRC; it goes out at one byte per 8 cycles.
// Receive: each good frame gives a one-cycle pulse on pkt_out_valid with
// the packet on pkt_out (payload bytes beyond len are zero).
module axb_link
  import axb_pkg::*;
#(
  parameter int unsigned NTAPS        = 32,
  parameter int unsigned STABLE_BYTES = 8,
  parameter int unsigned SLIP_LIMIT   = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        soft_reset,
  // packets to send
  input  logic        pkt_in_valid,
  output logic        pkt_in_ready,
  input  packet_t     pkt_in,
  // packets received
  output logic        pkt_out_valid,
  output packet_t     pkt_out,
  // status
  output logic        locked,
  output link_state_e state,
  output logic        crc_err,
  output logic        sync_err,
  // serial lane
  output logic        tx_bit,
  input  logic        rx_bit,
  output logic [$clog2(NTAPS)-1:0] delay_tap
);

  // ------------------------------------------------------------------ serdes
  logic [7:0] tx_byte, rx_byte;
  logic       tx_load, rx_valid, bitslip;

  axb_serdes u_serdes (
    .clk, .rst,
    .tx_byte, .tx_load, .tx_bit,
    .rx_bit, .bitslip, .rx_byte, .rx_valid
  );

  // ------------------------------------------------------------------ transmit
  typedef enum logic [2:0] {T_IDLE, T_SOF, T_HDR0, T_HDR1, T_PAY, T_CRCH, T_CRCL} tx_state_e;

  tx_state_e   tst;
  logic        tbusy;
  packet_t     tpkt;
  logic [3:0]  tidx;
  logic [15:0] tcrc;
  logic        tcrc_en;

  assign pkt_in_ready = locked && !tbusy;

  always_comb begin
    unique case (tst)
      T_IDLE:  tx_byte = (state == LS_DESKEW || state == LS_SLIP) ? K_PRESYNC : K_IDLE;
      T_SOF:   tx_byte = K_SOF;
      T_HDR0:  tx_byte = tpkt.hdr[15:8];
      T_HDR1:  tx_byte = tpkt.hdr[7:0];
      T_PAY:   tx_byte = tpkt.payload[tidx];
      T_CRCH:  tx_byte = tcrc[15:8];
      T_CRCL:  tx_byte = tcrc[7:0];
      default: tx_byte = K_IDLE;
    endcase
  end

  assign tcrc_en = tx_load && (tst == T_HDR0 || tst == T_HDR1 || tst == T_PAY);

  axb_crc16 u_tcrc (
    .clk, .rst,
    .clear (tx_load && tst == T_SOF),
    .en    (tcrc_en),
    .data  (tx_byte),
    .crc   (tcrc)
  );

  always_ff @(posedge clk) begin
    if (rst || !locked) begin
      tst   <= T_IDLE;
      tbusy <= 1'b0;
      tidx  <= '0;
      tpkt  <= '0;
    end else begin
      if (pkt_in_valid && pkt_in_ready) begin
        tpkt  <= pkt_in;
        tbusy <= 1'b1;
      end
      if (tx_load) begin
        unique case (tst)
          T_IDLE: if (tbusy) tst <= T_SOF;
          T_SOF:  tst <= T_HDR0;
          T_HDR0: tst <= T_HDR1;
          T_HDR1: begin
            tidx <= '0;
            tst  <= (tpkt.hdr.len == '0) ? T_CRCH : T_PAY;
          end
          T_PAY: begin
            tidx <= tidx + 1'b1;
            if (tidx + 1'b1 == tpkt.hdr.len) tst <= T_CRCH;
          end
          T_CRCH: tst <= T_CRCL;
          T_CRCL: begin
            tst   <= T_IDLE;
            tbusy <= 1'b0;
          end
          default: tst <= T_IDLE;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------ receive
  localparam int unsigned SBW = $clog2(STABLE_BYTES + 1);
  localparam int unsigned SLW = $clog2(SLIP_LIMIT + 1);

  logic [7:0]     last_byte;
  logic [SBW-1:0] stable_cnt;
  logic [SLW-1:0] slip_cnt;
  logic           slip_skip;
  logic [3:0]     ridx;
  logic [7:0]     rcrc_hi;
  logic [15:0]    rcrc;
  packet_t        rpkt;
  logic           rcrc_en;

  assign locked = (state == LS_IDLE) || (state == LS_FRAME);

  // bytes of the frame that the CRC covers: header and payload
  assign rcrc_en = rx_valid && state == LS_FRAME && ridx < 4'd2 + rpkt.hdr.len;

  axb_crc16 u_rcrc (
    .clk, .rst,
    .clear (rx_valid && state == LS_IDLE),
    .en    (rcrc_en),
    .data  (rx_byte),
    .crc   (rcrc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= LS_DESKEW;
      delay_tap     <= '0;
      last_byte     <= '0;
      stable_cnt    <= '0;
      slip_cnt      <= '0;
      slip_skip     <= 1'b0;
      bitslip       <= 1'b0;
      ridx          <= '0;
      rcrc_hi       <= '0;
      rpkt          <= '0;
      pkt_out       <= '0;
      pkt_out_valid <= 1'b0;
      crc_err       <= 1'b0;
      sync_err      <= 1'b0;
    end else begin
      bitslip       <= 1'b0;
      pkt_out_valid <= 1'b0;
      crc_err       <= 1'b0;
      sync_err      <= 1'b0;
      if (soft_reset) begin
        state      <= LS_DESKEW;
        stable_cnt <= '0;
      end else if (rx_valid) begin
        last_byte <= rx_byte;
        unique case (state)
          LS_DESKEW: begin
            if (rx_byte == last_byte) begin
              if (stable_cnt == SBW'(STABLE_BYTES - 1)) begin
                state     <= LS_SLIP;
                slip_cnt  <= '0;
                slip_skip <= 1'b0;
              end else begin
                stable_cnt <= stable_cnt + 1'b1;
              end
            end else begin
              stable_cnt <= '0;
              delay_tap  <= (delay_tap == $bits(delay_tap)'(NTAPS - 1)) ? '0 : delay_tap + 1'b1;
            end
          end
          LS_SLIP: begin
            if (slip_skip) begin
              slip_skip <= 1'b0;
            end else if (rx_byte == K_IDLE) begin
              state <= LS_IDLE;
            end else if (rx_byte == K_PRESYNC) begin
              state <= LS_SYNC;
            end else if (slip_cnt == SLW'(SLIP_LIMIT)) begin
              state      <= LS_DESKEW;
              stable_cnt <= '0;
            end else begin
              bitslip   <= 1'b1;
              slip_skip <= 1'b1;
              slip_cnt  <= slip_cnt + 1'b1;
            end
          end
          LS_SYNC: begin
            if (rx_byte == K_IDLE) begin
              state <= LS_IDLE;
            end else if (rx_byte != K_PRESYNC) begin
              state      <= LS_DESKEW;
              stable_cnt <= '0;
              sync_err   <= 1'b1;
            end
          end
          LS_IDLE: begin
            if (rx_byte == K_SOF) begin
              state <= LS_FRAME;
              ridx  <= '0;
              rpkt  <= '0;
            end else if (rx_byte != K_IDLE) begin
              state      <= LS_DESKEW;
              stable_cnt <= '0;
              sync_err   <= 1'b1;
            end
          end
          LS_FRAME: begin
            ridx <= ridx + 1'b1;
            if (ridx == 4'd0) begin
              rpkt.hdr[15:8] <= rx_byte;
              if (rx_byte[7:4] != ~rx_byte[3:0] || rx_byte[7:4] > 4'(MAX_PAYLOAD)) begin
                state      <= LS_DESKEW;
                stable_cnt <= '0;
                sync_err   <= 1'b1;
              end
            end else if (ridx == 4'd1) begin
              rpkt.hdr[7:0] <= rx_byte;
            end else if (ridx < 4'd2 + rpkt.hdr.len) begin
              rpkt.payload[ridx - 4'd2] <= rx_byte;
            end else if (ridx == 4'd2 + rpkt.hdr.len) begin
              rcrc_hi <= rx_byte;
            end else begin
              state <= LS_IDLE;
              if ({rcrc_hi, rx_byte} == rcrc) begin
                pkt_out       <= rpkt;
                pkt_out_valid <= 1'b1;
              end else begin
                crc_err <= 1'b1;
              end
            end
          end
          default: state <= LS_DESKEW;
        endcase
      end
    end
  end


  // packets are only taken and delivered while the link is locked
  a_in_locked: assert property (@(posedge clk) disable iff (rst) pkt_in_valid && pkt_in_ready |-> locked);
  a_out_locked: assert property (@(posedge clk) disable iff (rst) pkt_out_valid |-> locked);

endmodule
