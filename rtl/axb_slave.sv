// axb_slave: bridge slave on an expansion card.
//
// Receives request packets over the card's serial lane and replays them as
// AXI4-Lite transactions on the card's own bus (an AXI4-Lite manager
// port):
//   * READ_REQ  -> AR handshake, R handshake -> READ_RESP (RDATA, RRESP)
//   * WRITE_REQ -> AW and W (each held until its own READY), B handshake
//                  -> WRITE_RESP (BRESP)
// One request is handled at a time; the response packet is queued for the
// ARQ layer before the next request is taken from the receive queue.
//
// Interrupts: the NIRQ interrupt inputs (at most 8, one payload byte) are
// registered once; whenever they differ from the status last reported, an
// IRQ_UPDATE packet with the new status is queued (while no request is
// being turned into a response), and again each time the lane regains
// lock, since the master may have been reset meanwhile. The master mirrors that status on its
// interrupt outputs. Reporting status changes as packets follows the
// published protocol; the change detection is this design's choice.
module axb_slave
  import axb_pkg::*;
#(
  parameter int unsigned NIRQ        = 8,
  parameter int unsigned TIMEOUT     = 512,
  parameter int unsigned MAX_RETRIES = 8,
  parameter int unsigned NTAPS       = 32
) (
  input  logic            clk,
  input  logic            rst,
  // AXI4-Lite manager port on the card
  output axil_req_t       m_axil_req,
  input  axil_rsp_t       m_axil_rsp,
  // interrupt inputs from the card's IP
  input  logic [NIRQ-1:0] irq_in,
  // status
  output logic            locked,
  output link_state_e     link_state,
  output logic [31:0]     tx_count,
  output logic [31:0]     retx_count,
  output logic [31:0]     crc_errors,
  output logic [31:0]     sync_errors,
  // serial lane
  output logic            tx_bit,
  input  logic            rx_bit,
  output logic [$clog2(NTAPS)-1:0] delay_tap
);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_B, S_PUSH} slv_state_e;

  slv_state_e      st;
  logic            tx_valid, tx_ready, rx_valid, rx_ready;
  packet_t         tx_pkt, rx_pkt, resp_pkt, irq_pkt;
  logic [31:0]     addr, wdata;
  logic [3:0]      wstrb;
  logic            aw_done, w_done;
  logic [NIRQ-1:0] irq_q, irq_sent;
  logic            irq_push, irq_resend, locked_q;

  assign rx_ready = st == S_IDLE;
  assign irq_push = st == S_IDLE && (irq_q != irq_sent || irq_resend);

  always_comb begin
    irq_pkt            = '0;
    irq_pkt.hdr        = make_hdr(PT_IRQ_UPDATE, LEN_IRQ_UPDATE);
    irq_pkt.payload[0] = 8'(irq_q);
  end

  assign tx_valid = (st == S_PUSH) || irq_push;
  assign tx_pkt   = (st == S_PUSH) ? resp_pkt : irq_pkt;

  always_comb begin
    m_axil_req         = '0;
    m_axil_req.araddr  = addr;
    m_axil_req.arvalid = st == S_AR;
    m_axil_req.rready  = st == S_R;
    m_axil_req.awaddr  = addr;
    m_axil_req.awvalid = st == S_AW && !aw_done;
    m_axil_req.wdata   = wdata;
    m_axil_req.wstrb   = wstrb;
    m_axil_req.wvalid  = st == S_AW && !w_done;
    m_axil_req.bready  = st == S_B;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      addr     <= '0;
      wdata    <= '0;
      wstrb    <= '0;
      aw_done  <= 1'b0;
      w_done   <= 1'b0;
      resp_pkt <= '0;
      irq_q    <= '0;
      irq_sent <= '0;
      irq_resend <= 1'b0;
      locked_q <= 1'b0;
    end else begin
      irq_q    <= irq_in;
      locked_q <= locked;
      if (irq_push && tx_ready) begin
        irq_sent   <= irq_q;
        irq_resend <= 1'b0;
      end
      // the master may have been reset: report the status again on each lock
      if (locked && !locked_q) irq_resend <= 1'b1;
      unique case (st)
        S_IDLE: if (rx_valid) begin
          addr  <= {rx_pkt.payload[3], rx_pkt.payload[2], rx_pkt.payload[1], rx_pkt.payload[0]};
          wdata <= {rx_pkt.payload[7], rx_pkt.payload[6], rx_pkt.payload[5], rx_pkt.payload[4]};
          wstrb <= rx_pkt.payload[8][3:0];
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (rx_pkt.hdr.typ == PT_READ_REQ)       st <= S_AR;
          else if (rx_pkt.hdr.typ == PT_WRITE_REQ) st <= S_AW;
        end
        S_AR: if (m_axil_rsp.arready) st <= S_R;
        S_R: if (m_axil_rsp.rvalid) begin
          resp_pkt            <= '0;
          resp_pkt.hdr        <= make_hdr(PT_READ_RESP, LEN_READ_RESP);
          resp_pkt.payload[0] <= m_axil_rsp.rdata[7:0];
          resp_pkt.payload[1] <= m_axil_rsp.rdata[15:8];
          resp_pkt.payload[2] <= m_axil_rsp.rdata[23:16];
          resp_pkt.payload[3] <= m_axil_rsp.rdata[31:24];
          resp_pkt.payload[4] <= {6'd0, m_axil_rsp.rresp};
          st                  <= S_PUSH;
        end
        S_AW: begin
          if (m_axil_rsp.awready) aw_done <= 1'b1;
          if (m_axil_rsp.wready)  w_done  <= 1'b1;
          if ((aw_done || m_axil_rsp.awready) && (w_done || m_axil_rsp.wready)) st <= S_B;
        end
        S_B: if (m_axil_rsp.bvalid) begin
          resp_pkt            <= '0;
          resp_pkt.hdr        <= make_hdr(PT_WRITE_RESP, LEN_WRITE_RESP);
          resp_pkt.payload[0] <= {6'd0, m_axil_rsp.bresp};
          st                  <= S_PUSH;
        end
        S_PUSH: if (tx_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  axb_endpoint #(.TIMEOUT(TIMEOUT), .MAX_RETRIES(MAX_RETRIES), .NTAPS(NTAPS)) u_ep (
    .clk, .rst,
    .app_tx_valid(tx_valid), .app_tx_ready(tx_ready), .app_tx_pkt(tx_pkt),
    .app_rx_valid(rx_valid), .app_rx_ready(rx_ready), .app_rx_pkt(rx_pkt),
    .locked, .state(link_state), .tx_count, .retx_count, .crc_errors, .sync_errors,
    .tx_bit, .rx_bit, .delay_tap
  );


  // AXI4-Lite: a request stays valid and unchanged until it is accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (rst)
    m_axil_req.arvalid && !m_axil_rsp.arready |=> m_axil_req.arvalid && $stable(m_axil_req.araddr));
  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    m_axil_req.awvalid && !m_axil_rsp.awready |=> m_axil_req.awvalid && $stable(m_axil_req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (rst)
    m_axil_req.wvalid && !m_axil_rsp.wready |=>
      m_axil_req.wvalid && $stable(m_axil_req.wdata) && $stable(m_axil_req.wstrb));

endmodule
