// axb_system: main-board bridge and the bridge slaves of all expansion cards.
//
// The expansion bus of a modular engine control unit: a main board hosts
// the processor and the bridge master; I/O lives on up to NSLOTS
// expansion cards, each with a small FPGA running a bridge slave. Host
// register accesses to a slot's window travel as packets over that card's
// serial lane and are replayed on the card's AXI4-Lite bus; responses and
// card interrupt status come back the same way.
//
// This top holds the bridge master (axb_bridge_master, with its control
// port) and one axb_slave per slot. What lies between and around them is
// outside the logic and appears as ports:
//   * the lanes: m_tx_bit[s] is the master's transmit pair of slot s and
//     s_rx_bit[s] the card's receive pair (and s_tx_bit / m_rx_bit the
//     other direction); between them sit the LVDS buffers, the cable and
//     the input delay elements, which each receiver tunes with its
//     *_delay_tap output. A direct connection (m_tx_bit -> s_rx_bit,
//     s_tx_bit -> m_rx_bit) gives a working system.
//   * each card's AXI4-Lite bus (card_axil_req/rsp) with its I/O
//     functions, and the cards' interrupt lines (card_irq);
//   * the card reset, PROGRAM_B, CCLK/DIN, INIT_B and DONE lines of the
//     slave-serial configuration interface.
// The card reset from the control port also resets the card-side bridge
// slaves. All logic runs on one clock, which stands for the reference
// clock shared by all cards (one serial bit per cycle).
module axb_system
  import axb_pkg::*;
#(
  parameter int unsigned NSLOTS      = 4,
  parameter int unsigned NIRQ        = 8,
  parameter int unsigned SLOT_AW     = 26,
  parameter int unsigned TIMEOUT     = 512,
  parameter int unsigned MAX_RETRIES = 8,
  parameter int unsigned NTAPS       = 32,
  parameter int unsigned CCLK_HALF   = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  // host side
  input  axil_req_t                     s_ctrl_req,
  output axil_rsp_t                     s_ctrl_rsp,
  input  axil_req_t [NSLOTS-1:0]        s_slot_req,
  output axil_rsp_t [NSLOTS-1:0]        s_slot_rsp,
  output logic [NSLOTS-1:0][NIRQ-1:0]   irq,
  // configuration interface
  output logic                          card_rst,
  output logic [NSLOTS-1:0]             program_b,
  input  logic                          init_b,
  input  logic                          done,
  output logic                          cclk,
  output logic                          din,
  // serial lanes, master ends
  output logic [NSLOTS-1:0]             m_tx_bit,
  input  logic [NSLOTS-1:0]             m_rx_bit,
  output logic [NSLOTS-1:0][$clog2(NTAPS)-1:0] m_delay_tap,
  // serial lanes, card ends
  output logic [NSLOTS-1:0]             s_tx_bit,
  input  logic [NSLOTS-1:0]             s_rx_bit,
  output logic [NSLOTS-1:0][$clog2(NTAPS)-1:0] s_delay_tap,
  // card buses and interrupt lines
  output axil_req_t [NSLOTS-1:0]        card_axil_req,
  input  axil_rsp_t [NSLOTS-1:0]        card_axil_rsp,
  input  logic [NSLOTS-1:0][NIRQ-1:0]   card_irq,
  output logic [NSLOTS-1:0]             card_locked
);

  axb_bridge_master #(
    .NSLOTS(NSLOTS), .NIRQ(NIRQ), .SLOT_AW(SLOT_AW), .TIMEOUT(TIMEOUT),
    .MAX_RETRIES(MAX_RETRIES), .NTAPS(NTAPS), .CCLK_HALF(CCLK_HALF)
  ) u_bridge (
    .clk, .rst,
    .s_ctrl_req, .s_ctrl_rsp, .s_slot_req, .s_slot_rsp, .irq,
    .card_rst, .program_b, .init_b, .done, .cclk, .din,
    .tx_bit(m_tx_bit), .rx_bit(m_rx_bit), .delay_tap(m_delay_tap)
  );

  logic card_reset;
  assign card_reset = rst || card_rst;

  for (genvar s = 0; s < NSLOTS; s++) begin : g_card
    axb_slave #(
      .NIRQ(NIRQ), .TIMEOUT(TIMEOUT), .MAX_RETRIES(MAX_RETRIES), .NTAPS(NTAPS)
    ) u_slave (
      .clk, .rst(card_reset),
      .m_axil_req (card_axil_req[s]),
      .m_axil_rsp (card_axil_rsp[s]),
      .irq_in     (card_irq[s]),
      .locked     (card_locked[s]),
      .link_state (),
      .tx_count   (),
      .retx_count (),
      .crc_errors (),
      .sync_errors(),
      .tx_bit     (s_tx_bit[s]),
      .rx_bit     (s_rx_bit[s]),
      .delay_tap  (s_delay_tap[s])
    );
  end

endmodule
