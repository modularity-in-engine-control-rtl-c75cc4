// axb_bridge_master: the main-board side of the expansion bus bridge.
//
// Makes up to four expansion cards appear in the host's address space as
// if their registers were inside the main FPGA. It offers one AXI4-Lite
// subordinate port per slot (s_slot_*) and one control port (s_ctrl_*).
// Each slot port is served by its own axb_master with its own serial
// lane, so the lanes form a logical star (every card has a private
// point-to-point link to this block, no arbitration or routing). The
// host's interconnect decodes the slot windows (64 MiB each in the
// reference system); each axb_master forwards the low 26 address bits.
// The control port (axb_ctrl) holds the card reset, the master-side
// reset of all lanes, the per-slot PROGRAM_B lines, the slave-serial
// bitstream queue and per-lane status counters. Interrupt status
// received from each card appears on irq[slot].
// Timing: see axb_master (one transaction in flight per slot, lanes run
// independently) and axb_ctrl.
module axb_bridge_master
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
  // control port
  input  axil_req_t                     s_ctrl_req,
  output axil_rsp_t                     s_ctrl_rsp,
  // one AXI4-Lite port per slot
  input  axil_req_t [NSLOTS-1:0]        s_slot_req,
  output axil_rsp_t [NSLOTS-1:0]        s_slot_rsp,
  // interrupt status per slot
  output logic [NSLOTS-1:0][NIRQ-1:0]   irq,
  // expansion bus control signals
  output logic                          card_rst,
  output logic [NSLOTS-1:0]             program_b,
  input  logic                          init_b,
  input  logic                          done,
  output logic                          cclk,
  output logic                          din,
  // serial lanes
  output logic [NSLOTS-1:0]             tx_bit,
  input  logic [NSLOTS-1:0]             rx_bit,
  output logic [NSLOTS-1:0][$clog2(NTAPS)-1:0] delay_tap
);

  logic                    mstr_rst, lane_rst;
  logic [NSLOTS-1:0]       locked;
  logic [NSLOTS-1:0][31:0] tx_count, retx_count, crc_errors, sync_errors;

  assign lane_rst = rst || mstr_rst;

  axb_ctrl #(.NSLOTS(NSLOTS), .CCLK_HALF(CCLK_HALF)) u_ctrl (
    .clk, .rst,
    .s_axil_req(s_ctrl_req), .s_axil_rsp(s_ctrl_rsp),
    .card_rst, .mstr_rst, .program_b, .init_b, .done, .cclk, .din,
    .locked, .tx_count, .retx_count, .crc_errors, .sync_errors
  );

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    axb_master #(
      .SLOT_AW(SLOT_AW), .NIRQ(NIRQ), .TIMEOUT(TIMEOUT),
      .MAX_RETRIES(MAX_RETRIES), .NTAPS(NTAPS)
    ) u_master (
      .clk, .rst(lane_rst),
      .s_axil_req (s_slot_req[s]), .s_axil_rsp(s_slot_rsp[s]),
      .irq        (irq[s]),
      .locked     (locked[s]),
      .link_state (),
      .tx_count   (tx_count[s]),
      .retx_count (retx_count[s]),
      .crc_errors (crc_errors[s]),
      .sync_errors(sync_errors[s]),
      .tx_bit     (tx_bit[s]),
      .rx_bit     (rx_bit[s]),
      .delay_tap  (delay_tap[s])
    );
  end

endmodule
