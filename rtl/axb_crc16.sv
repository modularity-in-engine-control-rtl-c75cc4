// axb_crc16: byte-serial CRC-16 generator/checker.
//
// Every packet of the bridge is protected by a CRC-16 computed over its
// header and payload. This unit folds in one byte per cycle in which
// `en` is high and restarts from the initial value when `clear` is high
// (clear wins over en). The CRC register is visible on `crc` one cycle
// after the byte was presented. The polynomial (0x1021, initial value
// 0xFFFF, most significant bit first, no final inversion, i.e. the
// CRC-16/CCITT-FALSE variant) is this design's choice: only the CRC width
// is fixed by the protocol.
module axb_crc16
  import axb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc
);

  always_ff @(posedge clk) begin
    if (rst || clear) crc <= CRC_INIT;
    else if (en)      crc <= crc16_byte(crc, data);
  end

endmodule
