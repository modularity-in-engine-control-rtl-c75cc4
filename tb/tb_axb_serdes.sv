// tb_axb_serdes: serializer output looped back to the deserializer through
// a random bit delay. The testbench sends the comma 0xBC, slips the byte
// boundary until 0xBC is received, then checks that a stream of random
// bytes arrives in order, one byte every 8 cycles, and that the bits leave
// most significant first.
module tb_axb_serdes;
  logic clk = 0, rst = 1;
  logic [7:0] tx_byte = 8'hBC, rx_byte;
  logic tx_load, tx_bit, rx_bit, bitslip = 0, rx_valid;
  logic [15:0] dline = '0;
  int delay;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  bit aligned = 0, streaming = 0;
  int slips = 0, last_valid = -1, cyc = 0;

  axb_serdes dut (.clk, .rst, .tx_byte, .tx_load, .tx_bit, .rx_bit, .bitslip, .rx_byte, .rx_valid);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin dline <= {dline[14:0], tx_bit}; cyc <= cyc + 1; end
  assign rx_bit = dline[delay];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // source: commas until aligned, then random bytes (recorded)
  always @(posedge clk) if (!rst && tx_load) begin
    if (streaming) begin
      sent.push_back(tx_byte);
    end
  end
  always @(negedge clk) if (!rst && tx_load) tx_byte = streaming ? 8'($urandom) : 8'hBC;

  // bit order: after loading 0xBC the line shows 1,0,1,1,1,1,0,0
  logic [7:0] first_bits;
  initial begin
    delay = 1 + ($urandom % 12);
    repeat (3) @(negedge clk);
    rst = 0;
    wait (tx_load); @(posedge clk);
    for (int i = 7; i >= 0; i--) begin #1 first_bits[i] = tx_bit; @(posedge clk); end
    check(first_bits == 8'hBC, "msb first");
    // align
    while (!aligned) begin
      @(posedge clk);
      if (rx_valid) begin
        if (rx_byte == 8'hBC) aligned = 1;
        else begin
          @(negedge clk) bitslip = 1;
          @(negedge clk) bitslip = 0;
          slips++;
          repeat (2) @(posedge rx_valid);
        end
      end
    end
    check(slips < 8, "aligned within 8 slips");
    @(negedge clk) streaming = 1;
    // drain commas already in flight
    forever begin
      @(posedge clk);
      if (rx_valid && rx_byte != 8'hBC) break;
    end
    repeat (300) begin
      check(sent.size() != 0 && rx_byte == sent[0], "byte stream");
      if (sent.size() != 0) void'(sent.pop_front());
      last_valid = cyc;
      @(posedge clk);
      while (!rx_valid) @(posedge clk);
      check(cyc - last_valid == 8, "one byte per 8 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
