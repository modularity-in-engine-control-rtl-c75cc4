// axb_ctrl: control and status registers of the main-board bridge.
//
// A separate AXI4-Lite subordinate port (a 4 KiB window) controls the
// expansion bus signals that are not part of the serial lanes:
//   0x000 CTRL    RW  bit 0      SLV_RESET: 1 holds the expansion cards in
//                                reset (bus `card_rst`)
//                     bit 1      MSTR_RESET: 1 holds the master side of
//                                every lane in reset; releasing it starts
//                                a new link synchronisation
//                     bits 4+s   PROG[s]: 1 drives PROGRAM_B of slot s low
//   0x004 STATUS  RO  bits s     link of slot s locked
//                     bit 8      INIT_B,  bit 9  DONE (shared lines)
//                     bit 10     bitstream queue busy
//   0x008 BITSTR  WO  32-bit word appended to the bitstream queue that the
//                     slave-serial interface (CCLK/DIN) clocks out; the
//                     write is held off while the queue is full
//   0x010 + 16*s      TX_COUNT[s]   packets sent on lane s
//   0x014 + 16*s      RETX_COUNT[s] retransmissions on lane s
//   0x018 + 16*s      CRC_ERR[s]    frames dropped for a bad CRC
//   0x01C + 16*s      SYNC_ERR[s]   resynchronisations after bit errors
// Other addresses read 0 and answer SLVERR. Reset values are 0, so after
// reset PROGRAM_B is high and neither side is held in reset.
// The published design fixes which signals this port controls (resets,
// slave-serial control signals, a bitstream queue register, link state,
// packet and retransmission counts); the addresses and bit positions are
// this design's choice.
//
// Timing: a write is taken when AW and W are both valid and no write
// response is pending; BVALID follows one cycle later. A read is taken
// when no read response is pending; RVALID follows one cycle later.
module axb_ctrl
  import axb_pkg::*;
#(
  parameter int unsigned NSLOTS    = 4,
  parameter int unsigned CCLK_HALF = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  axil_req_t               s_axil_req,
  output axil_rsp_t               s_axil_rsp,
  // bus control
  output logic                    card_rst,
  output logic                    mstr_rst,
  output logic [NSLOTS-1:0]       program_b,
  input  logic                    init_b,
  input  logic                    done,
  output logic                    cclk,
  output logic                    din,
  // lane status
  input  logic [NSLOTS-1:0]       locked,
  input  logic [NSLOTS-1:0][31:0] tx_count,
  input  logic [NSLOTS-1:0][31:0] retx_count,
  input  logic [NSLOTS-1:0][31:0] crc_errors,
  input  logic [NSLOTS-1:0][31:0] sync_errors
);

  localparam logic [11:0] A_CTRL   = 12'h000;
  localparam logic [11:0] A_STATUS = 12'h004;
  localparam logic [11:0] A_BITSTR = 12'h008;

  logic [NSLOTS-1:0] prog;
  logic              bs_valid, bs_ready, bs_busy;
  logic              wr_take, rd_take;
  logic [11:0]       waddr, raddr;
  logic              bvalid, rvalid;
  logic [1:0]        bresp, rresp;
  logic [31:0]       rdata, rd_val;
  logic              rd_ok;

  assign waddr = s_axil_req.awaddr[11:0];
  assign raddr = s_axil_req.araddr[11:0];

  assign program_b = ~prog;

  // a write to the bitstream register waits for room in the queue
  assign wr_take  = s_axil_req.awvalid && s_axil_req.wvalid && !bvalid
                    && (waddr != A_BITSTR || bs_ready);
  assign bs_valid = wr_take && waddr == A_BITSTR;
  assign rd_take  = s_axil_req.arvalid && !rvalid;

  axb_slave_serial #(.CCLK_HALF(CCLK_HALF)) u_ss (
    .clk, .rst,
    .wr_valid(bs_valid), .wr_ready(bs_ready), .wr_data(s_axil_req.wdata),
    .cclk, .din, .busy(bs_busy)
  );

  always_comb begin
    rd_val = '0;
    rd_ok  = 1'b1;
    if (raddr == A_CTRL) begin
      rd_val[0]               = card_rst;
      rd_val[1]               = mstr_rst;
      rd_val[4 +: NSLOTS]     = prog;
    end else if (raddr == A_STATUS) begin
      rd_val[NSLOTS-1:0]      = locked;
      rd_val[8]               = init_b;
      rd_val[9]               = done;
      rd_val[10]              = bs_busy;
    end else if (raddr >= 12'h010 && raddr < 12'h010 + 12'(16 * NSLOTS)) begin
      unique case (raddr[3:2])
        2'd0: rd_val = tx_count[raddr[11:4] - 8'd1];
        2'd1: rd_val = retx_count[raddr[11:4] - 8'd1];
        2'd2: rd_val = crc_errors[raddr[11:4] - 8'd1];
        default: rd_val = sync_errors[raddr[11:4] - 8'd1];
      endcase
    end else begin
      rd_ok = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      card_rst <= 1'b0;
      mstr_rst <= 1'b0;
      prog     <= '0;
      bvalid   <= 1'b0;
      bresp    <= RESP_OKAY;
      rvalid   <= 1'b0;
      rresp    <= RESP_OKAY;
      rdata    <= '0;
    end else begin
      if (bvalid && s_axil_req.bready) bvalid <= 1'b0;
      if (rvalid && s_axil_req.rready) rvalid <= 1'b0;
      if (wr_take) begin
        bvalid <= 1'b1;
        bresp  <= RESP_OKAY;
        if (waddr == A_CTRL) begin
          if (s_axil_req.wstrb[0]) begin
            card_rst <= s_axil_req.wdata[0];
            mstr_rst <= s_axil_req.wdata[1];
            prog[NSLOTS-1:0] <= s_axil_req.wdata[4 +: NSLOTS];
          end
        end else if (waddr != A_BITSTR) begin
          bresp <= RESP_SLVERR;
        end
      end
      if (rd_take) begin
        rvalid <= 1'b1;
        rdata  <= rd_val;
        rresp  <= rd_ok ? RESP_OKAY : RESP_SLVERR;
      end
    end
  end

  always_comb begin
    s_axil_rsp         = '0;
    s_axil_rsp.awready = wr_take;
    s_axil_rsp.wready  = wr_take;
    s_axil_rsp.bvalid  = bvalid;
    s_axil_rsp.bresp   = bresp;
    s_axil_rsp.arready = rd_take;
    s_axil_rsp.rvalid  = rvalid;
    s_axil_rsp.rdata   = rdata;
    s_axil_rsp.rresp   = rresp;
  end

endmodule
