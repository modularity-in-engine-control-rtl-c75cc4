// axb_slave_serial: clocks an FPGA bitstream out on a slave-serial interface.
//
// Expansion-card FPGAs are configured over the slave-serial interface:
// the configuration clock CCLK and the data line DIN, which the card
// FPGA latches on rising CCLK edges. The host writes the bitstream, 32
// bits at a time, into a queue (wr_*, valid/ready); this block takes one
// word at a time and shifts it out most significant bit first. Each bit
// is put on `din` while `cclk` is low and held through the following
// high phase; both phases last CCLK_HALF cycles of `clk`, so one bit
// takes 2*CCLK_HALF cycles. `cclk` rests low and `busy` is high while the
// queue holds words or a word is being shifted. The queue, the 32-bit
// word and the bit order are this design's choices; the published
// design only says a register writes into a queue from which the
// bitstream is clocked out.
module axb_slave_serial #(
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned CCLK_HALF = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_data,
  output logic        cclk,
  output logic        din,
  output logic        busy
);

  localparam int unsigned HW = $clog2(CCLK_HALF + 1);

  logic        q_valid, q_ready;
  logic [31:0] q_data, sh;
  logic [4:0]  bitcnt;
  logic [HW-1:0] phase_cnt;
  logic        active;

  axb_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .in_valid (wr_valid), .in_ready (wr_ready), .in_data (wr_data),
    .out_valid(q_valid),  .out_ready(q_ready),  .out_data(q_data),
    .count    ()
  );

  assign q_ready = !active;
  assign din     = sh[31];
  assign busy    = active || q_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      sh        <= '0;
      bitcnt    <= '0;
      phase_cnt <= '0;
      cclk      <= 1'b0;
    end else if (!active) begin
      cclk <= 1'b0;
      if (q_valid) begin
        active    <= 1'b1;
        sh        <= q_data;
        bitcnt    <= 5'd31;
        phase_cnt <= '0;
      end
    end else if (phase_cnt == HW'(CCLK_HALF - 1)) begin
      phase_cnt <= '0;
      if (!cclk) begin
        cclk <= 1'b1;
      end else begin
        cclk <= 1'b0;
        sh   <= {sh[30:0], 1'b0};
        if (bitcnt == '0) active <= 1'b0;
        else              bitcnt <= bitcnt - 1'b1;
      end
    end else begin
      phase_cnt <= phase_cnt + 1'b1;
    end
  end

endmodule
