// axb_master: bridge master for one expansion slot (main-board side).
//
// Offers an AXI4-Lite subordinate port to the main board's interconnect and
// forwards every transaction over the slot's serial lane:
//   * a write (AW and W both valid) becomes a WRITE_REQ packet with the
//     address, data and byte strobes; the WRITE_RESP packet that comes back
//     gives BRESP;
//   * a read (AR) becomes a READ_REQ packet; the READ_RESP packet gives
//     RDATA and RRESP;
//   * an IRQ_UPDATE packet from the card sets the `irq` outputs to the
//     interrupt status it carries, at any time.
// AXI4-Lite has no outstanding transactions, so one transaction is in
// flight at a time; AWREADY/WREADY or ARREADY are given in the cycle the
// request packet enters the transmission queue, writes first when both are
// waiting. Only the address bits below SLOT_AW are sent, so each card sees
// its own window starting at 0 (64 MiB windows, SLOT_AW = 26). Packets that
// do not fit the transaction in flight (a late response after a reset) are
// dropped. Interrupt lines are level signals that follow the card; the host
// clears an interrupt at its source on the card through ordinary register
// accesses.
module axb_master
  import axb_pkg::*;
#(
  parameter int unsigned SLOT_AW     = 26,
  parameter int unsigned NIRQ        = 8,
  parameter int unsigned TIMEOUT     = 512,
  parameter int unsigned MAX_RETRIES = 8,
  parameter int unsigned NTAPS       = 32
) (
  input  logic            clk,
  input  logic            rst,
  // AXI4-Lite subordinate port
  input  axil_req_t       s_axil_req,
  output axil_rsp_t       s_axil_rsp,
  // interrupt status of the card
  output logic [NIRQ-1:0] irq,
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

  typedef enum logic [2:0] {M_IDLE, M_WAIT_R, M_WAIT_B, M_R, M_B} mst_state_e;

  mst_state_e  st;
  logic        tx_valid, tx_ready, rx_valid, rx_ready;
  packet_t     tx_pkt, rx_pkt;
  logic [31:0] rdata;
  logic [1:0]  resp;
  logic        do_write, do_read;
  logic [31:0] waddr, raddr;

  assign waddr    = s_axil_req.awaddr & ((32'd1 << SLOT_AW) - 32'd1);
  assign raddr    = s_axil_req.araddr & ((32'd1 << SLOT_AW) - 32'd1);
  assign do_write = st == M_IDLE && s_axil_req.awvalid && s_axil_req.wvalid && tx_ready;
  assign do_read  = st == M_IDLE && !(s_axil_req.awvalid && s_axil_req.wvalid)
                    && s_axil_req.arvalid && tx_ready;

  always_comb begin
    tx_pkt = '0;
    if (do_write) begin
      tx_pkt.hdr = make_hdr(PT_WRITE_REQ, LEN_WRITE_REQ);
      for (int i = 0; i < 4; i++) begin
        tx_pkt.payload[i]     = waddr[8*i +: 8];
        tx_pkt.payload[4 + i] = s_axil_req.wdata[8*i +: 8];
      end
      tx_pkt.payload[8] = {4'h0, s_axil_req.wstrb};
    end else begin
      tx_pkt.hdr = make_hdr(PT_READ_REQ, LEN_READ_REQ);
      for (int i = 0; i < 4; i++) tx_pkt.payload[i] = raddr[8*i +: 8];
    end
  end

  assign tx_valid = do_write || do_read;
  assign rx_ready = (st != M_R) && (st != M_B);

  always_comb begin
    s_axil_rsp         = '0;
    s_axil_rsp.awready = do_write;
    s_axil_rsp.wready  = do_write;
    s_axil_rsp.arready = do_read;
    s_axil_rsp.rvalid  = st == M_R;
    s_axil_rsp.rdata   = rdata;
    s_axil_rsp.rresp   = resp;
    s_axil_rsp.bvalid  = st == M_B;
    s_axil_rsp.bresp   = resp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= M_IDLE;
      rdata <= '0;
      resp  <= '0;
      irq   <= '0;
    end else begin
      unique case (st)
        M_IDLE: begin
          if (do_write)     st <= M_WAIT_B;
          else if (do_read) st <= M_WAIT_R;
        end
        M_WAIT_R: if (rx_valid && rx_pkt.hdr.typ == PT_READ_RESP) begin
          rdata <= {rx_pkt.payload[3], rx_pkt.payload[2], rx_pkt.payload[1], rx_pkt.payload[0]};
          resp  <= rx_pkt.payload[4][1:0];
          st    <= M_R;
        end
        M_WAIT_B: if (rx_valid && rx_pkt.hdr.typ == PT_WRITE_RESP) begin
          resp <= rx_pkt.payload[0][1:0];
          st   <= M_B;
        end
        M_R: if (s_axil_req.rready) st <= M_IDLE;
        M_B: if (s_axil_req.bready) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
      if (rx_valid && rx_ready && rx_pkt.hdr.typ == PT_IRQ_UPDATE)
        irq <= rx_pkt.payload[0][NIRQ-1:0];
    end
  end

  axb_endpoint #(.TIMEOUT(TIMEOUT), .MAX_RETRIES(MAX_RETRIES), .NTAPS(NTAPS)) u_ep (
    .clk, .rst,
    .app_tx_valid(tx_valid), .app_tx_ready(tx_ready), .app_tx_pkt(tx_pkt),
    .app_rx_valid(rx_valid), .app_rx_ready(rx_ready), .app_rx_pkt(rx_pkt),
    .locked, .state(link_state), .tx_count, .retx_count, .crc_errors, .sync_errors,
    .tx_bit, .rx_bit, .delay_tap
  );


  // AXI4-Lite: a response stays valid and unchanged until it is accepted
  a_r_stable: assert property (@(posedge clk) disable iff (rst)
    s_axil_rsp.rvalid && !s_axil_req.rready |=>
      s_axil_rsp.rvalid && $stable(s_axil_rsp.rdata) && $stable(s_axil_rsp.rresp));
  a_b_stable: assert property (@(posedge clk) disable iff (rst)
    s_axil_rsp.bvalid && !s_axil_req.bready |=> s_axil_rsp.bvalid && $stable(s_axil_rsp.bresp));

endmodule
