// tb_axb_crc16: checks the byte-serial CRC-16 against the published check
// value of CRC-16/CCITT-FALSE ("123456789" -> 0x29B1) and against a
// bit-by-bit long-division reference for random messages, including the
// effect of `clear` between messages and of idle cycles with en low.
module tb_axb_crc16;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [7:0]  data = '0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  axb_crc16 dut (.clk, .rst, .clear, .en, .data, .crc);

  always #5 clk = ~clk;

  // reference: polynomial division one message bit at a time
  function automatic logic [15:0] ref_crc(input logic [7:0] msg[], input int n);
    logic [15:0] r = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        logic fb = r[15] ^ msg[i][b];
        r = {r[14:0], 1'b0};
        if (fb) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  task automatic run_msg(input logic [7:0] msg[], input int n, input logic [15:0] expect_crc);
    @(negedge clk) begin clear = 1; en = 0; end
    @(negedge clk) clear = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) begin en = 1; data = msg[i]; end
      if ($urandom % 3 == 0) begin @(negedge clk) begin en = 0; data = 8'hFF; end end
    end
    @(negedge clk) en = 0;
    checks++;
    if (crc !== expect_crc) begin
      failures++;
      $display("FAIL crc=%h expected %h (n=%0d)", crc, expect_crc, n);
    end
  endtask

  initial begin
    logic [7:0] m[];
    repeat (3) @(negedge clk);
    rst = 0;
    m = new[9];
    foreach (m[i]) m[i] = 8'h31 + 8'(i);
    run_msg(m, 9, 16'h29B1);
    for (int t = 0; t < 200; t++) begin
      automatic int n = 1 + ($urandom % 11);
      m = new[n];
      foreach (m[i]) m[i] = 8'($urandom);
      run_msg(m, n, ref_crc(m, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
