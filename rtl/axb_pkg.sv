// axb_pkg: shared types and constants of the AXI4-Lite serial bridge.
//
// The bridge carries AXI4-Lite register transactions between a main board
// and expansion cards over one full-duplex serial lane per card. Every
// packet is a two-byte header, a payload of 0 to 9 bytes and a CRC-16.
// The header fields (length and its complement, ACK flag, ACK number,
// sequence number, two pad bits, 3-bit type) and the type codes follow the
// published packet format; the payload layouts of the individual packet
// types, the byte order and the CRC polynomial are this design's own
// choices (see the constants below).
//
// Link-level comma characters: 0xBC is sent while a receiver is still
// aligning, 0xDC once it is aligned (and as the idle character), 0x1C marks
// the start of a frame.
package axb_pkg;

  // Packet type codes
  typedef enum logic [2:0] {
    PT_READ_REQ   = 3'b000,
    PT_READ_RESP  = 3'b001,
    PT_WRITE_REQ  = 3'b010,
    PT_WRITE_RESP = 3'b011,
    PT_IRQ_UPDATE = 3'b100,
    PT_ACK_ONLY   = 3'b101,
    PT_SYN        = 3'b110
  } pkt_type_e;

  // Header, first byte on the wire is {len, nlen}, second is the rest.
  typedef struct packed {
    logic [3:0] len;   // payload length in bytes
    logic [3:0] nlen;  // bitwise complement of len, checked by the receiver
    logic       ack;   // ackn is valid
    logic       ackn;  // sequence number being acknowledged
    logic       seqn;  // sequence number of this packet
    logic [1:0] pad;   // always zero
    pkt_type_e  typ;
  } pkt_hdr_t;

  localparam int unsigned MAX_PAYLOAD = 9;

  // A whole packet as it is held in the queues and retransmission buffer.
  // payload[0] is the first payload byte sent on the wire.
  typedef struct packed {
    pkt_hdr_t                          hdr;
    logic [MAX_PAYLOAD-1:0][7:0]       payload;
  } packet_t;

  // Payload lengths (own choice, addresses and data least significant byte first):
  //   READ_REQ   : addr[31:0]                     4 bytes
  //   WRITE_REQ  : addr[31:0], data[31:0], wstrb  9 bytes
  //   READ_RESP  : data[31:0], rresp              5 bytes
  //   WRITE_RESP : bresp                          1 byte
  //   IRQ_UPDATE : irq[7:0]                       1 byte
  //   ACK_ONLY, SYN                               0 bytes
  localparam logic [3:0] LEN_READ_REQ   = 4'd4;
  localparam logic [3:0] LEN_WRITE_REQ  = 4'd9;
  localparam logic [3:0] LEN_READ_RESP  = 4'd5;
  localparam logic [3:0] LEN_WRITE_RESP = 4'd1;
  localparam logic [3:0] LEN_IRQ_UPDATE = 4'd1;

  // Comma characters
  localparam logic [7:0] K_PRESYNC = 8'hBC;
  localparam logic [7:0] K_IDLE    = 8'hDC;
  localparam logic [7:0] K_SOF     = 8'h1C;

  // Link receiver states (names as in the synchronisation sequence)
  typedef enum logic [2:0] {
    LS_DESKEW = 3'd0,
    LS_SLIP   = 3'd1,
    LS_SYNC   = 3'd2,
    LS_IDLE   = 3'd3,
    LS_FRAME  = 3'd4
  } link_state_e;

  // CRC-16/CCITT-FALSE: polynomial 0x1021, initial value 0xFFFF, MSB first.
  localparam logic [15:0] CRC_POLY = 16'h1021;
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // One byte step of the CRC, shared by the RTL and the testbenches' reference.
  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] data);
    logic [15:0] c;
    c = crc ^ {data, 8'h00};
    for (int i = 0; i < 8; i++) begin
      c = c[15] ? ((c << 1) ^ CRC_POLY) : (c << 1);
    end
    return c;
  endfunction

  // Make a header with a consistent nlen field.
  function automatic pkt_hdr_t make_hdr(input pkt_type_e typ, input logic [3:0] len);
    pkt_hdr_t h;
    h      = '0;
    h.typ  = typ;
    h.len  = len;
    h.nlen = ~len;
    return h;
  endfunction

  // AXI4-Lite bus, 32-bit address and data, split into the signals driven by
  // the manager (req) and those driven by the subordinate (rsp).
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // AXI4-Lite response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

endpackage
