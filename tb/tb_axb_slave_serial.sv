// tb_axb_slave_serial: pushes random 32-bit words (faster than they drain,
// so the queue fills and back-pressures) and captures DIN on every rising
// CCLK edge. Checks the captured bit stream against the words sent, most
// significant bit first, the CCLK period of 2*CCLK_HALF cycles, and that
// CCLK rests low and `busy` falls when everything has been sent.
module tb_axb_slave_serial;
  localparam int HALF = 3;
  logic clk = 0, rst = 1;
  logic wr_valid = 0, wr_ready, cclk, din, busy;
  logic [31:0] wr_data = '0;
  int checks = 0, failures = 0;
  bit exp_bits[$];
  int nbits = 0, last_rise = -1, cyc = 0, bad_period = 0, stalls = 0;
  logic cclk_q = 0;

  axb_slave_serial #(.DEPTH(4), .CCLK_HALF(HALF)) dut (.clk, .rst, .wr_valid, .wr_ready, .wr_data, .cclk, .din, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    cclk_q <= cclk;
    if (!rst && cclk && !cclk_q) begin
      checks++;
      if (exp_bits.size() == 0 || din != exp_bits[0]) begin
        failures++; $display("FAIL bit %0d", nbits);
      end
      if (exp_bits.size() != 0) void'(exp_bits.pop_front());
      nbits++;
      if (last_rise >= 0 && cyc - last_rise != 2*HALF && !(cyc - last_rise > 2*HALF)) bad_period++;
      last_rise <= cyc;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(!busy && !cclk, "idle after reset");
    for (int w = 0; w < 12; w++) begin
      @(negedge clk);
      wr_valid = 1;
      wr_data  = $urandom;
      while (!wr_ready) begin @(negedge clk); stalls++; end
      for (int i = 31; i >= 0; i--) exp_bits.push_back(wr_data[i]);
      @(negedge clk) wr_valid = 0;
    end
    wait (!busy);
    repeat (5) @(negedge clk);
    check(nbits == 12*32, "all bits clocked out");
    check(exp_bits.size() == 0, "no bit left");
    check(bad_period == 0, "cclk period");
    check(stalls > 0, "queue back-pressure seen");
    check(!cclk, "cclk rests low");
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
