// axb_serdes: byte serializer and deserializer with bit slip for one lane.
//
// This is the synthesizable equivalent of the output/input SERDES
// primitives the link is built on. `clk` is the bit clock: one serial bit
// leaves on `tx_bit` and one is sampled from `rx_bit` every cycle. (An FPGA
// implementation sends two bits per cycle of a 400 MHz DDR clock for 800
// Mbit/s; a single-rate bit clock keeps this model free of vendor
// primitives.) Bits are sent most significant first (own choice).
//
// Transmit: every eighth cycle `tx_load` is high and the byte on `tx_byte`
// is taken; its first bit appears on tx_bit in the next cycle.
// Receive: the deserializer cuts the incoming bit stream into bytes and
// pulses `rx_valid` with the byte on `rx_byte`. A one-cycle pulse on
// `bitslip` delays the byte boundary by one bit, which is how the link
// layer finds the byte alignment of the other end's comma characters.
module axb_serdes (
  input  logic       clk,
  input  logic       rst,
  // transmit
  input  logic [7:0] tx_byte,
  output logic       tx_load,
  output logic       tx_bit,
  // receive
  input  logic       rx_bit,
  input  logic       bitslip,
  output logic [7:0] rx_byte,
  output logic       rx_valid
);

  logic [2:0] tx_cnt, rx_cnt;
  logic [7:0] tx_sh;
  logic [6:0] rx_sh;   // the seven bits received before the current one

  assign tx_load = (tx_cnt == 3'd7);
  assign tx_bit  = tx_sh[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_cnt <= '0;
      tx_sh  <= '0;
    end else begin
      tx_cnt <= tx_cnt + 1'b1;
      tx_sh  <= tx_load ? tx_byte : {tx_sh[6:0], 1'b0};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_cnt   <= '0;
      rx_sh    <= '0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_sh    <= {rx_sh[5:0], rx_bit};
      rx_valid <= 1'b0;
      if (!bitslip) rx_cnt <= rx_cnt + 1'b1;
      if (rx_cnt == 3'd7 && !bitslip) begin
        rx_byte  <= {rx_sh, rx_bit};
        rx_valid <= 1'b1;
      end
    end
  end

endmodule
